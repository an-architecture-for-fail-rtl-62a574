// tb_fail_silent_controller: self-checking test of the shutdown / scrub
// sequencer, with the package's configuration layout (1 I/O word, 4 core
// words). Configuration writes are collected in a reference memory.
// Checks: host writes pass while idle and are dropped while busy or halted;
// a falling edge on irq_n in scrub mode rewrites every word from golden in
// CFG_WORDS cycles, then pulses region_clr and mon_clr together and counts
// the scrub; in shutdown mode the I/O word is rewritten with the safe
// setting first, every core word is then written to 0, and failed (and
// core_power_down when enabled) rise at the expected cycle; once halted, a new
// edge or a host write changes nothing until reset.
module tb_fail_silent_controller;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, irq_n = 1, scrub_mode = 0, power_down_en = 0;
  cfg_image_t golden;
  logic host_we = 0;
  logic [CFG_AW-1:0] host_addr = '0;
  logic [CFG_WORD_W-1:0] host_wdata = '0;
  logic cfg_we, region_clr, mon_clr, busy, failed, core_power_down;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_WORD_W-1:0] cfg_wdata;
  logic [15:0] seu_count;
  logic [CFG_WORDS-1:0][CFG_WORD_W-1:0] mem;
  int n_writes;
  int checks = 0, failures = 0;
  localparam logic [CFG_WORD_W-1:0] SAFE_WORD = CFG_WORD_W'(io_inactive(1'b1));

  fail_silent_controller dut (
    .clk(clk), .rst_n(rst_n), .irq_n(irq_n), .scrub_mode(scrub_mode),
    .power_down_en(power_down_en), .golden(golden),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .region_clr(region_clr), .mon_clr(mon_clr), .busy(busy), .failed(failed),
    .core_power_down(core_power_down), .seu_count(seu_count));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (cfg_we && cfg_addr < CFG_WORDS) begin
      mem[cfg_addr] <= cfg_wdata;
      n_writes <= n_writes + 1;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: mem=%h busy=%b failed=%b seu=%0d", what, $time, mem, busy, failed, seu_count);
    end
  endtask

  task automatic host_write(int a, logic [CFG_WORD_W-1:0] d);
    host_we = 1; host_addr = CFG_AW'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    mem = '0;
    n_writes = 0;
    golden = '0;
    for (int w = 0; w < CFG_WORDS; w++) golden[w*CFG_WORD_W +: CFG_WORD_W] = CFG_WORD_W'($urandom | 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host programs the memory while idle
    for (int w = 0; w < CFG_WORDS; w++) host_write(w, golden[w*CFG_WORD_W +: CFG_WORD_W]);
    check(mem == golden, "host writes pass while idle");
    check(!busy && !failed, "idle after programming");

    // ---- scrub, twice ----
    scrub_mode = 1;
    for (int s = 0; s < 2; s++) begin
      host_write(2, 8'h5A);   // emulated upset
      check(mem[2] == 8'h5A, "upset written");
      irq_n = 0;
      cyc = 0;
      @(negedge clk);         // the edge that sees the falling irq
      check(busy, "busy after falling edge");
      host_write(3, 8'hC3);   // dropped: controller owns the port
      cyc = 1;
      while (!region_clr && cyc < 50) begin
        check(!mon_clr, "mon_clr only with region_clr");
        @(negedge clk);
        cyc++;
      end
      check(cyc == CFG_WORDS, "scrub takes CFG_WORDS write cycles");
      check(mon_clr, "monitors re-armed together with restart");
      check(mem == golden, "scrub restored the golden image");
      irq_n = 1;              // monitors re-armed
      @(negedge clk);
      check(!busy, "idle after restart");
      check(seu_count == 16'(s + 1), "scrub counted");
    end

    // ---- shutdown on a new falling edge ----
    irq_n = 1;
    @(negedge clk);
    scrub_mode = 0;
    power_down_en = 1;
    irq_n = 0;
    @(negedge clk);
    check(busy, "shutdown starts on falling edge");
    // ---- shutdown sequence ----
    cyc = 1;
    @(negedge clk);
    cyc++;
    check(mem[0] == SAFE_WORD, "I/O word made safe first");
    check(mem[1] == golden[1*CFG_WORD_W +: CFG_WORD_W], "core untouched while I/O is made safe");
    while (!failed && cyc < 50) begin
      host_write(0, 8'hFF);  // attempt to re-enable outputs: dropped
      cyc++;
    end
    check(cyc == IO_WORDS + CORE_WORDS + 2, "shutdown cycle count");
    check(core_power_down, "core powered down when enabled");
    check(mem[0] == SAFE_WORD, "I/O word keeps safe setting");
    for (int w = IO_WORDS; w < CFG_WORDS; w++) check(mem[w] == '0, "core word erased");
    irq_n = 1;
    repeat (3) @(negedge clk);
    irq_n = 0;
    repeat (3) @(negedge clk);
    host_write(0, 8'hFF);
    check(mem[0] == SAFE_WORD, "halted: host cannot re-enable outputs");
    check(busy && failed, "stays halted");

    // ---- shutdown without power-down ----
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check(!failed && !core_power_down && !busy, "reset clears status");
    power_down_en = 0;
    irq_n = 1;
    @(negedge clk);
    irq_n = 0;
    repeat (IO_WORDS + CORE_WORDS + 2) @(negedge clk);
    check(failed && !core_power_down, "no power-down when not enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
