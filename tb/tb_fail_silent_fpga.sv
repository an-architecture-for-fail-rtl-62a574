// tb_fail_silent_fpga: end-to-end test of the fail-silent FPGA core at its
// default parameters.
//
// A board model closes the pad loop: the pad carries the driven value when
// the buffer drives it, otherwise its pull level, unless an external driver
// (a fault on the board net) overrides it. The expected fail-silent output
// comes from the stream recurrence of x^8 + x^6 + x^5 + x^4 + 1, restarted
// whenever the regions are restarted; the triple-redundant side has its own
// reference.
//
// Sequence: program the configuration through the processor port; run
// fault-free; in scrub mode, emulate a configuration upset in region 2, then
// a fault on the board net, then a mismatch of the two input sets, each of
// which must trip the monitors, silence the output one edge after the
// mismatch, scrub and resume; corrupt one of the three TMR modules and check
// the voted output stays right; finally, in shutdown mode with power-down,
// upset region 1 and check the output becomes a pulled-up input, the core
// configuration is erased, failure and power-down are flagged and the output
// cannot be enabled again. Every mechanism is counted and must occur.
module tb_fail_silent_fpga;
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
  logic [NUM_OUTPUTS-1:0] pad2_o, pad2_oe, pad2_pull_en, pad2_pull_up;
  logic tmr_en = 0;
  logic [2:0][LFSR_WIDTH-1:0] tmr_taps;
  logic [NUM_OUTPUTS-1:0] tmr_out;
  logic [2:0] tmr_outvoted;

  fail_silent_fpga dut (
    .clk(clk), .rst_n(rst_n), .in1_en(in1_en), .in2_en(in2_en),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .golden_cfg(golden_cfg), .scrub_mode(scrub_mode), .power_down_en(power_down_en),
    .sys_clr(sys_clr), .mon_clr(mon_clr), .fail_irq_n(fail_irq_n), .failed(failed),
    .core_power_down(core_power_down), .ctrl_busy(ctrl_busy), .seu_count(seu_count),
    .tripped(tripped), .pad_i(pad_i), .pad_o(pad_o), .pad_oe(pad_oe),
    .pad_pull_en(pad_pull_en), .pad_pull_up(pad_pull_up),
    .pad2_i('0), .pad2_o(pad2_o), .pad2_oe(pad2_oe), .pad2_pull_en(pad2_pull_en),
    .pad2_pull_up(pad2_pull_up),
    .tmr_en(tmr_en), .tmr_taps(tmr_taps), .tmr_out(tmr_out), .tmr_outvoted(tmr_outvoted));

  always #5 clk = ~clk;

  // ---------------- board model ----------------
  logic ext_drive = 0, ext_val = 0;
  always_comb begin
    for (int k = 0; k < NUM_OUTPUTS; k++)
      pad_i[k] = ext_drive ? ext_val :
                 pad_oe[k] ? pad_o[k] :
                 pad_pull_en[k] ? pad_pull_up[k] : 1'b0;
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

  // ---------------- reference streams ----------------
  // x(t) = x(t-8) ^ x(t-6) ^ x(t-5) ^ x(t-4); a register seeded with 1 holds
  // x(t-k) in bit k, and its MSB is x(t-7).
  typedef bit [15:0] hist_t;
  function automatic hist_t seed_hist();
    return 16'h0001;
  endfunction
  function automatic hist_t step_hist(hist_t h);
    return {h[14:0], h[7] ^ h[5] ^ h[4] ^ h[3]};
  endfunction

  hist_t ref1, ref_tmr;
  always @(posedge clk) begin
    if (!rst_n || sys_clr || dut.u_ctrl.region_clr) ref1 <= seed_hist();
    else if (in1_en) ref1 <= step_hist(ref1);
    if (!rst_n) ref_tmr <= seed_hist();
    else if (tmr_en) ref_tmr <= step_hist(ref_tmr);
  end

  // ---------------- per-cycle monitors ----------------
  bit check_output = 0;     // fail-silent output must equal the reference
  bit check_tmr = 0;
  int n_trip = 0, n_latency_ok = 0, n_pad_fault = 0, n_input_fault = 0;
  int n_tmr_masked = 0, n_scrub = 0, n_shutdown = 0, n_blocked = 0, n_power_down = 0;
  int n_out_ok = 0;
  bit mismatch_seen, prev_irq = 1;
  logic [15:0] prev_seu = 0;

  always @(posedge clk) begin
    // the monitors see a mismatch at this edge while the outputs are enabled
    mismatch_seen <= rst_n && (dut.mon_a != dut.mon_b) && dut.buf_en &&
                     !(mon_clr || dut.u_ctrl.mon_clr);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (mismatch_seen) begin
        check(pad_oe == '0 && !fail_irq_n, "output disabled one edge after a mismatch");
        n_latency_ok++;
      end
      if (prev_irq && !fail_irq_n) n_trip++;
      prev_irq = fail_irq_n;
      if (seu_count != prev_seu) n_scrub++;
      prev_seu = seu_count;
      if (check_output && pad_oe[0]) begin
        check(pad_i[0] == ref1[7], "fail-silent output matches reference");
        n_out_ok++;
      end
      if (check_tmr) begin
        check(tmr_out[0] == ref_tmr[7], "voted TMR output matches reference");
        if (tmr_outvoted != 3'b000) n_tmr_masked++;
      end
    end
  end

  // ---------------- helpers ----------------
  cfg_image_t written;   // what has been written to configuration memory

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
      in1_en = ($urandom_range(0, 7) != 0);
      in2_en = in1_en;
      @(negedge clk);
    end
  endtask

  // run until the controller has finished a scrub; returns the cycles from
  // the monitors tripping to the outputs being enabled again
  task automatic wait_scrub(output int downtime, input bit release_ext);
    int c = 0;
    logic [15:0] s0 = seu_count;
    while (fail_irq_n && c < 3000) begin run(1); c++; end
    check(!fail_irq_n, "monitors tripped");
    if (release_ext) ext_drive = 0;
    downtime = 0;
    while (seu_count == s0 && downtime < 100) begin
      check(pad_oe == '0, "output silent during scrub");
      run(1);
      downtime++;
    end
    check(pad_oe == '1 && fail_irq_n, "output enabled again after scrub");
    written = golden_cfg;
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
    cfg_image_t upset;
    int downtime, c;

    io.pull_up = '1; io.pull_en = '1; io.drive_en = '1;
    core.taps1 = LFSR_TAPS;
    core.taps2 = LFSR_TAPS;
    core.iso1_init = {NUM_OUTPUTS{LUT_IDENTITY}};
    core.iso2_init = {NUM_OUTPUTS{LUT_IDENTITY}};
    golden_cfg = pack_image(io, core);
    written = '0;
    for (int m = 0; m < 3; m++) tmr_taps[m] = LFSR_TAPS;

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pad_oe == '0 && pad_pull_en == '0, "un-programmed: no driver");

    // ---- configure, restart, run fault-free ----
    write_image(golden_cfg);
    sys_clr = 1; mon_clr = 1;
    @(negedge clk);
    sys_clr = 0; mon_clr = 0;
    tmr_en = 1;
    check_output = 1;
    check_tmr = 1;
    run(300);
    check(pad_oe == '1 && fail_irq_n && seu_count == 0, "fault-free operation");
    check(n_trip == 0, "no trip without a fault");
    check(pad2_oe == '0, "single output set: region 2 drives no pins");

    // ---- TMR: corrupt module 1 for the rest of the test ----
    tmr_taps[1] = LFSR_TAPS ^ 8'h01;

    // ---- scrub mode: configuration upset in region 2 ----
    scrub_mode = 1;
    upset = golden_cfg;
    core.taps2 = LFSR_TAPS | 8'h01;            // turn one bit on
    upset = pack_image(io, core);
    core.taps2 = LFSR_TAPS;
    write_image(upset);
    wait_scrub(downtime, 0);
    check(downtime == CFG_WORDS + 2, "scrub downtime in cycles");
    check(seu_count == 1, "first scrub counted");
    run(200);

    // ---- board-net fault on the output pin ----
    check_output = 0;
    ext_val = 0;
    ext_drive = 1;
    c = n_trip;
    wait_scrub(downtime, 1);
    if (n_trip > c) n_pad_fault++;
    check(seu_count == 2, "second scrub counted");
    check_output = 1;
    run(200);

    // ---- the two input sets disagree for one cycle ----
    in1_en = 1; in2_en = 0;
    @(negedge clk);
    c = n_trip;
    wait_scrub(downtime, 0);
    if (n_trip > c) n_input_fault++;
    check(seu_count == 3, "third scrub counted");
    run(200);

    // ---- shutdown mode: configuration upset in region 1 ----
    scrub_mode = 0;
    power_down_en = 1;
    check_output = 0;        // region 1 itself is wrong now
    core.taps1 = LFSR_TAPS | 8'h01;
    upset = pack_image(io, core);
    core.taps1 = LFSR_TAPS;
    write_image(upset);
    c = 0;
    while (fail_irq_n && c < 3000) begin run(1); c++; end
    check(!fail_irq_n, "monitors tripped on region 1 upset");
    c = 0;
    while (!failed && c < 100) begin
      check(pad_oe == '0, "output silent during shutdown");
      run(1);
      c++;
    end
    check(c == IO_WORDS + CORE_WORDS + 2, "shutdown takes the expected cycles");
    if (failed) n_shutdown++;
    if (core_power_down) n_power_down++;
    check(dut.io_cfg.drive_en == '0 && dut.io_cfg.pull_en == '1 && dut.io_cfg.pull_up == '1,
          "output buffer reconfigured as pulled-up input");
    check(dut.core_cfg == '0, "core configuration erased");
    check(pad_i == '1, "pad rests at its pull-up level");
    // processor tries to re-enable the output and re-arm the monitors
    host_we = 1; host_addr = '0; host_wdata = '1;
    @(negedge clk);
    host_we = 0;
    mon_clr = 1;
    @(negedge clk);
    mon_clr = 0;
    run(20);
    check(fail_irq_n, "monitors re-armed: erased regions agree");
    check(pad_oe == '0, "output cannot be enabled again");
    if (pad_oe == '0 && fail_irq_n) n_blocked++;

    // ---- every mechanism happened ----
    check(n_out_ok > 500, "fault-free output cycles checked");
    check(n_trip >= 4, "monitor trips");
    check(n_latency_ok >= 4, "one-edge silencing observed");
    check(n_scrub == 3, "scrubs");
    check(n_pad_fault == 1, "board-net fault detected");
    check(n_input_fault == 1, "input-set mismatch detected");
    check(n_tmr_masked > 0, "TMR masked a faulty module");
    check(n_shutdown == 1, "shutdown");
    check(n_power_down == 1, "core power-down");
    check(n_blocked == 1, "re-enable blocked after shutdown");
    $display("mechanisms: trips=%0d silenced=%0d scrubs=%0d pad_fault=%0d input_fault=%0d tmr_masked=%0d shutdown=%0d power_down=%0d blocked=%0d",
             n_trip, n_latency_ok, n_scrub, n_pad_fault, n_input_fault, n_tmr_masked,
             n_shutdown, n_power_down, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
