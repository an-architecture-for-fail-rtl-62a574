// tb_fault_monitor_bank: self-checking test of the set of fault monitors.
// Three outputs, two replicas, in both enable polarities. A reference keeps,
// per output, whether a mismatch has been sampled since the last clear, and
// gives the expected combined enable (AND of the latches for active high, OR
// for active low), interrupt line and per-output status. Then one latch of
// replica 0 is held at its "enabled" value, as a stuck-at fault, and the
// check is that replica 1 still turns the outputs off.
module tb_fault_monitor_bank;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [N-1:0] a = '0, b = '0;
  logic oe_h, ok_h, oe_l, ok_l;
  logic [N-1:0] tr_h, tr_l;
  logic [N-1:0] ref_tr;
  int checks = 0, failures = 0;

  fault_monitor_bank #(.NUM_OUT(N), .REPLICAS(2), .ACTIVE_HIGH(1'b1)) dut_h (
    .clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .oe(oe_h), .ok(ok_h), .tripped(tr_h));
  fault_monitor_bank #(.NUM_OUT(N), .REPLICAS(2), .ACTIVE_HIGH(1'b0)) dut_l (
    .clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .oe(oe_l), .ok(ok_l), .tripped(tr_l));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: ref=%b tr_h=%b oe_h=%b ok_h=%b tr_l=%b oe_l=%b ok_l=%b",
               what, $time, ref_tr, tr_h, oe_h, ok_h, tr_l, oe_l, ok_l);
    end
  endtask

  task automatic check_all();
    check(tr_h == ref_tr, "tripped (active high)");
    check(tr_l == ref_tr, "tripped (active low)");
    check(oe_h == (ref_tr == '0), "combined enable AND");
    check(oe_l == (ref_tr != '0), "combined enable OR");
    check(ok_h == (ref_tr == '0) && ok_l == (ref_tr == '0), "interrupt line");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    ref_tr = '0;
    check_all();
    for (int run = 0; run < 30; run++) begin
      for (int c = 0; c < 20; c++) begin
        a = N'($urandom);
        b = a;
        if ($urandom_range(0, 14) == 0) b[$urandom_range(0, N-1)] ^= 1'b1;
        @(posedge clk);
        ref_tr |= (a ^ b);
        @(negedge clk);
        check_all();
      end
      clr = 1;
      @(negedge clk);
      clr = 0;
      ref_tr = '0;
      check_all();
    end
    // stuck-at "enabled" latch in replica 0 of output 1
    force dut_h.g_rep[0].g_out[1].u_mon.q = 1'b1;
    force dut_l.g_rep[0].g_out[1].u_mon.q = 1'b0;
    a = '0; b = 3'b010;
    @(negedge clk);
    a = '0; b = '0;
    @(negedge clk);
    check(oe_h == 1'b0, "replica 1 disables outputs despite stuck latch (AND)");
    check(oe_l == 1'b1, "replica 1 disables outputs despite stuck latch (OR)");
    check(tr_h[1] && tr_l[1], "fault reported for output 1");
    release dut_h.g_rep[0].g_out[1].u_mon.q;
    release dut_l.g_rep[0].g_out[1].u_mon.q;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
