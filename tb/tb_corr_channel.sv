// tb_corr_channel: self-checking test of one correlation channel.
//
// Drives random samples, enables and clears into a signed and an unsigned
// channel and compares the delayed output and the accumulator every cycle
// with a reference computed here with integer arithmetic: the delay register
// takes del_in on en, the accumulator adds und * (delay register) on acc_en,
// clr zeroes both.
module tb_corr_channel;
  localparam int unsigned DW = 8, ACC_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en, acc_en;
  logic [DW-1:0] del_in, und;
  logic [DW-1:0] del_out_s, del_out_u;
  logic [ACC_W-1:0] acc_s, acc_u;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  corr_channel #(.DW(DW), .ACC_W(ACC_W), .SIGNED(1'b1)) dut_s (
    .clk, .rst_n, .clr, .en, .acc_en, .del_in, .und, .del_out(del_out_s), .acc(acc_s));
  corr_channel #(.DW(DW), .ACC_W(ACC_W), .SIGNED(1'b0)) dut_u (
    .clk, .rst_n, .clr, .en, .acc_en, .del_in, .und, .del_out(del_out_u), .acc(acc_u));

  longint ref_del, ref_acc_s, ref_acc_u;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; acc_en = 0; del_in = 0; und = 0;
    ref_del = 0; ref_acc_s = 0; ref_acc_u = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clr    = ($urandom_range(0, 199) == 0);
      en     = $urandom_range(0, 1) == 1;
      acc_en = $urandom_range(0, 2) != 0;
      del_in = DW'($urandom);
      und    = DW'($urandom);
      // reference update for the coming edge
      @(posedge clk);
      if (clr) begin
        ref_del = 0; ref_acc_s = 0; ref_acc_u = 0;
      end else begin
        if (acc_en) begin
          ref_acc_s = ref_acc_s + longint'($signed(und)) * longint'($signed(DW'(ref_del)));
          ref_acc_u = ref_acc_u + longint'(und) * ref_del;
        end
        if (en) ref_del = longint'(del_in);
      end
      #1;
      check("del_out_s", longint'(del_out_s), ref_del);
      check("del_out_u", longint'(del_out_u), ref_del);
      check("acc_s", longint'($signed(acc_s)), longint'($signed(ACC_W'(ref_acc_s))));
      check("acc_u", longint'(acc_u), longint'(unsigned'(ACC_W'(ref_acc_u))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
