// tb_fail_silent_fpga_variants: end-to-end test of the fail-silent core in
// its other build options: the monitors compare region 1's output taken
// before the output buffer (PAD_READBACK = 0), the buffers have an
// active-low tri-state control with the dual OR-combined monitors
// (OE_ACTIVE_HIGH = 0), and the monitor set is duplicated (MON_REPLICAS = 2).
//
// Checks: correct output after programming; a fault on the board net is not
// seen by monitors that do not look at the pad; a configuration upset in
// region 2 silences the pin one edge after the mismatch and is scrubbed;
// with one monitor replica's flip-flop stuck at "enabled", an upset in
// shutdown mode is still caught by the other replica and the pin ends as a
// pulled-up input.
//
// A second instance, dut2, gets the same stimulus but is built with both
// output sets (OUTPUT_SETS = 2) and pad read-back: both pin sets must carry
// the reference sequence, a fault driven onto region 2's pin must trip it and
// be scrubbed, and at shutdown both pin sets must end as pulled-up inputs.
module tb_fail_silent_fpga_variants;
  import fs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in1_en = 0, in2_en = 0;
  logic host_we = 0;
  logic [CFG_AW-1:0] host_addr = '0;
  logic [CFG_WORD_W-1:0] host_wdata = '0;
  cfg_image_t golden_cfg = '0;
  logic scrub_mode = 1, power_down_en = 0, sys_clr = 0, mon_clr = 0;
  logic fail_irq_n, failed, core_power_down, ctrl_busy;
  logic [15:0] seu_count;
  logic [NUM_OUTPUTS-1:0] tripped, pad_i, pad_o, pad_oe, pad_pull_en, pad_pull_up;
  logic [2:0][LFSR_WIDTH-1:0] tmr_taps = {3{LFSR_TAPS}};
  logic [NUM_OUTPUTS-1:0] tmr_out;
  logic [2:0] tmr_outvoted;

  fail_silent_fpga #(.MON_REPLICAS(2), .PAD_READBACK(1'b0), .OE_ACTIVE_HIGH(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in1_en(in1_en), .in2_en(in2_en),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .golden_cfg(golden_cfg), .scrub_mode(scrub_mode), .power_down_en(power_down_en),
    .sys_clr(sys_clr), .mon_clr(mon_clr), .fail_irq_n(fail_irq_n), .failed(failed),
    .core_power_down(core_power_down), .ctrl_busy(ctrl_busy), .seu_count(seu_count),
    .tripped(tripped), .pad_i(pad_i), .pad_o(pad_o), .pad_oe(pad_oe),
    .pad_pull_en(pad_pull_en), .pad_pull_up(pad_pull_up),
    .pad2_i('0), .pad2_o(unused_pad2_o), .pad2_oe(unused_pad2_oe),
    .pad2_pull_en(unused_pad2_pe), .pad2_pull_up(unused_pad2_pu),
    .tmr_en(1'b0), .tmr_taps(tmr_taps), .tmr_out(tmr_out), .tmr_outvoted(tmr_outvoted));

  logic [NUM_OUTPUTS-1:0] unused_pad2_o, unused_pad2_oe, unused_pad2_pe, unused_pad2_pu;
  logic [NUM_OUTPUTS-1:0] d2_pad_i, d2_pad_o, d2_pad_oe, d2_pad_pe, d2_pad_pu;
  logic [NUM_OUTPUTS-1:0] d2_pad2_i, d2_pad2_o, d2_pad2_oe, d2_pad2_pe, d2_pad2_pu, d2_tripped;
  logic d2_irq_n, d2_failed, d2_pwr, d2_busy;
  logic [15:0] d2_seu;
  logic [NUM_OUTPUTS-1:0] d2_tmr_out;
  logic [2:0] d2_tmr_ov;

  fail_silent_fpga #(.OUTPUT_SETS(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .in1_en(in1_en), .in2_en(in2_en),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .golden_cfg(golden_cfg), .scrub_mode(scrub_mode), .power_down_en(power_down_en),
    .sys_clr(sys_clr), .mon_clr(mon_clr), .fail_irq_n(d2_irq_n), .failed(d2_failed),
    .core_power_down(d2_pwr), .ctrl_busy(d2_busy), .seu_count(d2_seu),
    .tripped(d2_tripped), .pad_i(d2_pad_i), .pad_o(d2_pad_o), .pad_oe(d2_pad_oe),
    .pad_pull_en(d2_pad_pe), .pad_pull_up(d2_pad_pu),
    .pad2_i(d2_pad2_i), .pad2_o(d2_pad2_o), .pad2_oe(d2_pad2_oe),
    .pad2_pull_en(d2_pad2_pe), .pad2_pull_up(d2_pad2_pu),
    .tmr_en(1'b0), .tmr_taps(tmr_taps), .tmr_out(d2_tmr_out), .tmr_outvoted(d2_tmr_ov));

  always #5 clk = ~clk;

  function automatic logic pad_level(logic ext_en, logic ext_v, logic oe, logic o,
                                      logic pe, logic pu);
    return ext_en ? ext_v : oe ? o : pe ? pu : 1'b0;
  endfunction

  logic ext_drive = 0, ext_val = 0, ext2_drive = 0;
  always_comb begin
    for (int k = 0; k < NUM_OUTPUTS; k++) begin
      pad_i[k]     = pad_level(ext_drive, ext_val, pad_oe[k], pad_o[k], pad_pull_en[k], pad_pull_up[k]);
      d2_pad_i[k]  = pad_level(1'b0, 1'b0, d2_pad_oe[k], d2_pad_o[k], d2_pad_pe[k], d2_pad_pu[k]);
      d2_pad2_i[k] = pad_level(ext2_drive, 1'b1, d2_pad2_oe[k], d2_pad2_o[k], d2_pad2_pe[k], d2_pad2_pu[k]);
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: pad_o=%b oe=%b pad_i=%b irq_n=%b seu=%0d failed=%b",
               what, $time, pad_o, pad_oe, pad_i, fail_irq_n, seu_count, failed);
    end
  endtask

  // reference: x(t) = x(t-8) ^ x(t-6) ^ x(t-5) ^ x(t-4), output x(t-7)
  bit [15:0] ref1, ref2;
  always @(posedge clk) begin
    if (!rst_n || sys_clr || dut.u_ctrl.region_clr) ref1 <= 16'h0001;
    else if (in1_en) ref1 <= {ref1[14:0], ref1[7] ^ ref1[5] ^ ref1[4] ^ ref1[3]};
    if (!rst_n || sys_clr || dut2.u_ctrl.region_clr) ref2 <= 16'h0001;
    else if (in1_en) ref2 <= {ref2[14:0], ref2[7] ^ ref2[5] ^ ref2[4] ^ ref2[3]};
  end
  int n_out2_ok = 0;
  bit check_set2 = 1;   // region 2 is itself wrong while it is upset
  always @(negedge clk) begin
    if (rst_n && check_output && d2_pad_oe[0]) begin
      check(d2_pad_i[0] == ref2[7], "output set 1 matches reference");
      if (check_set2 && !ext2_drive) check(d2_pad2_i[0] == ref2[7], "output set 2 matches reference");
      check(d2_pad2_oe == d2_pad_oe, "both output sets share the enable");
      n_out2_ok++;
    end
    if (ext2_drive && !d2_irq_n) ext2_drive <= 0;  // fault seen: remove it
  end

  bit check_output = 0, mismatch_seen;
  int n_silenced = 0, n_out_ok = 0;
  always @(posedge clk)
    mismatch_seen <= rst_n && (dut.mon_a != dut.mon_b) && fail_irq_n &&
                     !(mon_clr || dut.u_ctrl.mon_clr);
  always @(negedge clk) begin
    if (rst_n && mismatch_seen) begin
      check(pad_oe == '0 && !fail_irq_n, "silenced one edge after a mismatch");
      n_silenced++;
    end
    if (rst_n && check_output && pad_oe[0]) begin
      check(pad_i[0] == ref1[7], "output matches reference");
      n_out_ok++;
    end
  end

  cfg_image_t written = '0;
  task automatic write_image(cfg_image_t img);
    for (int w = 0; w < CFG_WORDS; w++) begin
      if (img[w*CFG_WORD_W +: CFG_WORD_W] != written[w*CFG_WORD_W +: CFG_WORD_W]) begin
        host_we = 1;
        host_addr = CFG_AW'(w);
        host_wdata = img[w*CFG_WORD_W +: CFG_WORD_W];
        @(negedge clk);
        host_we = 0;
      end
    end
    written = img;
  endtask

  task automatic run(int cycles);
    repeat (cycles) begin
      in1_en = ($urandom_range(0, 3) != 0);
      in2_en = in1_en;
      @(negedge clk);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    io_cfg_t io;
    core_cfg_t core;
    int c;
    io.pull_up = '1; io.pull_en = '1; io.drive_en = '1;
    core.taps1 = LFSR_TAPS;
    core.taps2 = LFSR_TAPS;
    core.iso1_init = {NUM_OUTPUTS{LUT_IDENTITY}};
    core.iso2_init = {NUM_OUTPUTS{LUT_IDENTITY}};
    golden_cfg = pack_image(io, core);

    repeat (3) @(negedge clk);
    rst_n = 1;
    write_image(golden_cfg);
    sys_clr = 1; mon_clr = 1;
    @(negedge clk);
    sys_clr = 0; mon_clr = 0;
    check_output = 1;
    run(200);
    check(pad_oe == '1 && fail_irq_n, "enabled after programming (active-low control)");
    check(dut.buf_en == 1'b0, "active-low buffer enable is low while enabled");

    // board-net fault: invisible to monitors that look before the buffer
    check_output = 0;
    ext_val = 1; ext_drive = 1;
    ext2_drive = 1;
    run(100);
    check(fail_irq_n && seu_count == 0, "board-net fault not monitored without read-back");
    check(d2_seu == 1 && !ext2_drive, "fault on region 2's pin caught and scrubbed");
    check(d2_pad_oe == '1 && d2_pad2_oe == '1, "both output sets enabled after scrub");
    ext_drive = 0;
    check_output = 1;
    run(20);

    // region 2 upset, scrub mode
    check_set2 = 0;
    core.taps2 = LFSR_TAPS | 8'h01;
    write_image(pack_image(io, core));
    core.taps2 = LFSR_TAPS;
    c = 0;
    while (fail_irq_n && c < 3000) begin run(1); c++; end
    check(!fail_irq_n, "region 2 upset trips");
    c = 0;
    while (seu_count == 0 && c < 100) begin run(1); c++; end
    check(c == CFG_WORDS + 2, "scrub downtime");
    written = golden_cfg;
    run(200);
    check(pad_oe == '1, "enabled again after scrub");
    check_set2 = 1;

    // replica 0 of the monitors stuck at "enabled"; shutdown mode
    force dut.u_mon.g_rep[0].g_out[0].u_mon.q = 1'b0;
    scrub_mode = 0;
    check_output = 0;
    core.taps2 = LFSR_TAPS ^ 8'h08;
    write_image(pack_image(io, core));
    c = 0;
    while (!failed && c < 3000) begin run(1); c++; end
    check(failed, "stuck replica does not hide the fault");
    check(pad_oe == '0 && pad_pull_en == '1 && pad_i == '1, "pin is a pulled-up input");
    check(tripped == '1, "fault reported");
    check(d2_failed && d2_seu == 2, "second instance: scrubbed upset, then shut down");
    check(d2_pad_oe == '0 && d2_pad2_oe == '0 && d2_pad_i == '1 && d2_pad2_i == '1,
          "second instance: both output sets are pulled-up inputs");
    release dut.u_mon.g_rep[0].g_out[0].u_mon.q;

    check(n_out_ok > 300, "output cycles checked");
    check(n_silenced >= 2, "silencing observed");
    check(n_out2_ok > 300, "output cycles of both sets checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
