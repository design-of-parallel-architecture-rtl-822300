// tb_stb_rate_halver: self-checking test of the block-to-block sample combiner.
//
// Feeds random samples with random enable gaps and occasional clears. Every
// second sample after reset or clear must produce, exactly one cycle later,
// a single en_out pulse carrying the sums of the two samples on both paths.
// The outputs must keep their value between pulses.
module tb_stb_rate_halver;
  localparam int unsigned DW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en_in, en_out;
  logic [DW-1:0] und_in, del_in;
  logic [DW:0]   und_out, del_out;
  int checks = 0, failures = 0;
  int pulses = 0;

  always #5 clk = ~clk;

  stb_rate_halver #(.DW(DW)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   have_first;
    int   fu, fd;
    bit   exp_pulse;
    int   exp_u, exp_d;
    clr = 0; en_in = 0; und_in = 0; del_in = 0;
    have_first = 0; exp_pulse = 0; exp_u = 0; exp_d = 0; fu = 0; fd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      clr    = ($urandom_range(0, 99) == 0);
      en_in  = ($urandom_range(0, 2) != 0);
      und_in = DW'($urandom);
      del_in = DW'($urandom);
      @(posedge clk);
      // reference for what the outputs show after this edge
      if (clr) begin
        have_first = 0; exp_pulse = 0; exp_u = 0; exp_d = 0;
      end else begin
        exp_pulse = 0;
        if (en_in) begin
          if (!have_first) begin
            fu = int'(und_in); fd = int'(del_in); have_first = 1;
          end else begin
            exp_u = fu + int'(und_in); exp_d = fd + int'(del_in);
            exp_pulse = 1; have_first = 0;
          end
        end
      end
      #1;
      check("en_out", longint'(en_out), longint'(exp_pulse));
      check("und_out", longint'(und_out), longint'(exp_u));
      check("del_out", longint'(del_out), longint'(exp_d));
      if (en_out) pulses++;
    end
    check("pulses seen", longint'(pulses > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
