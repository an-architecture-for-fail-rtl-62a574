// tb_io_buffer: self-checking test of the configurable bidirectional buffer.
// Exhaustive over data, tri-state control and configuration, for both enable
// polarities: the pad is driven only when configured as an output and enabled
// by the monitors, an input-only buffer can never be enabled, the pull
// settings reach the pad, and the pad level is returned for the monitor.
module tb_io_buffer;
  logic d, t, de, pe, pu, pi;
  logic po_h, oe_h, ppe_h, ppu_h, q_h;
  logic po_l, oe_l, ppe_l, ppu_l, q_l;
  int checks = 0, failures = 0;

  io_buffer #(.OE_ACTIVE_HIGH(1'b1)) dut_h (
    .d(d), .t(t), .cfg_drive_en(de), .cfg_pull_en(pe), .cfg_pull_up(pu), .pad_i(pi),
    .pad_o(po_h), .pad_oe(oe_h), .pad_pull_en(ppe_h), .pad_pull_up(ppu_h), .q(q_h));
  io_buffer #(.OE_ACTIVE_HIGH(1'b0)) dut_l (
    .d(d), .t(t), .cfg_drive_en(de), .cfg_pull_en(pe), .cfg_pull_up(pu), .pad_i(pi),
    .pad_o(po_l), .pad_oe(oe_l), .pad_pull_en(ppe_l), .pad_pull_up(ppu_l), .q(q_l));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: d=%b t=%b de=%b pe=%b pu=%b pi=%b", what, d, t, de, pe, pu, pi);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {d, t, de, pe, pu, pi} = 6'(v);
      #1;
      check(oe_h == (de && t), "active-high enable");
      check(oe_l == (de && !t), "active-low enable");
      check(!(de == 0 && (oe_h || oe_l)), "input-only buffer never drives");
      check(po_h == d && po_l == d, "data to pad");
      check(ppe_h == pe && ppu_h == pu && ppe_l == pe && ppu_l == pu, "pull settings");
      check(q_h == pi && q_l == pi, "pad read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
