// fail_silent_fpga: a fail-silent FPGA core with its monitoring and shutdown.
//
// The same system function (lfsr_system_function) runs in two working
// regions, each with its own copy of the input set (in1_en, in2_en). Region
// 1's outputs leave the device through bidirectional io_buffers; what the
// pads actually carry is read back through the buffers' input halves. For
// every output, that read-back and region 2's output each pass through an
// isolation LUT (plb_lut3 programmed as identity) into a fault monitor in the
// guard band between the regions. The monitors (fault_monitor_bank) latch the
// first mismatch and, one clock edge later, drop the common enable of all
// output buffers: the device falls silent and stays silent. The same status
// line is a falling-edge interrupt to fail_silent_controller, which then
// either shuts the core down (outputs turned into pulled inputs, then the
// configuration erased, failure flagged, optional power-down) or, in scrub
// mode, rewrites the configuration from golden_cfg and restarts both regions
// in step.
//
// Everything the regions, LUTs and buffers do is set by config_memory, written
// by the embedded processor through host_* (write only). Writing a changed bit
// there emulates a configuration upset.
//
// Beside it, and independent of it, stands the guard-banded triple-redundant
// arrangement: three copies of the system function (taps from tmr_taps) and a
// tmr_voter. The guard bands themselves are placement constraints and have no
// logic of their own.
//
// Parameters: MON_REPLICAS copies of the monitor set, ANDed; PULL_UP picks
// the pull applied at shutdown; PAD_READBACK = 1 (default, as in the built
// prototype) monitors the level read back from the pad, so pin and board-net
// faults are caught too, while 0 monitors region 1's output before the
// buffer, the basic form; OE_ACTIVE_HIGH = 0 builds the dual monitors (OR)
// for buffers with an active-low tri-state control; OUTPUT_SETS = 2 lets
// region 2 drive a second set of pins (pad2_*) through its own buffers, under
// the same enable, and with PAD_READBACK its pad read-back feeds the monitor.
// With OUTPUT_SETS = 1 (default) only region 1's set leaves the device and
// the pad2_* outputs are held at 0 (undriven pins).
//
// Pads: the pad cells are outside; pad_o/pad_oe/pad_pull_* control them and
// pad_i is the level they sense. All logic runs on clk; rst_n is asynchronous,
// active low, and leaves the core un-programmed.
//
// Structure and order of operations follow the described architecture and
// prototype; the configuration layout, the input sets as LFSR step enables,
// the host-side clears and the status outputs are this design's.
module fail_silent_fpga
  import fs_pkg::*;
#(
  parameter int unsigned MON_REPLICAS   = 1,
  parameter bit          PULL_UP        = 1'b1,
  parameter bit          PAD_READBACK   = 1'b1,
  parameter bit          OE_ACTIVE_HIGH = 1'b1,
  parameter int unsigned OUTPUT_SETS    = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // the two copies of the input set
  input  logic                        in1_en,
  input  logic                        in2_en,
  // embedded processor side
  input  logic                        host_we,
  input  logic [CFG_AW-1:0]           host_addr,
  input  logic [CFG_WORD_W-1:0]       host_wdata,
  input  cfg_image_t                  golden_cfg,
  input  logic                        scrub_mode,
  input  logic                        power_down_en,
  input  logic                        sys_clr,       // restart both regions
  input  logic                        mon_clr,       // re-arm the monitors
  output logic                        fail_irq_n,    // interrupt, falls on a fault
  output logic                        failed,
  output logic                        core_power_down,
  output logic                        ctrl_busy,
  output logic [15:0]                 seu_count,
  output logic [NUM_OUTPUTS-1:0]      tripped,
  // pads of the fail-silent outputs
  input  logic [NUM_OUTPUTS-1:0]      pad_i,
  output logic [NUM_OUTPUTS-1:0]      pad_o,
  output logic [NUM_OUTPUTS-1:0]      pad_oe,
  output logic [NUM_OUTPUTS-1:0]      pad_pull_en,
  output logic [NUM_OUTPUTS-1:0]      pad_pull_up,
  // pads of region 2's output set (used when OUTPUT_SETS = 2)
  input  logic [NUM_OUTPUTS-1:0]      pad2_i,
  output logic [NUM_OUTPUTS-1:0]      pad2_o,
  output logic [NUM_OUTPUTS-1:0]      pad2_oe,
  output logic [NUM_OUTPUTS-1:0]      pad2_pull_en,
  output logic [NUM_OUTPUTS-1:0]      pad2_pull_up,
  // guard-banded triple modular redundancy
  input  logic                        tmr_en,
  input  logic [2:0][LFSR_WIDTH-1:0]  tmr_taps,
  output logic [NUM_OUTPUTS-1:0]      tmr_out,
  output logic [2:0]                  tmr_outvoted
);
  // ---------------- configuration ----------------
  logic                  cfg_we;
  logic [CFG_AW-1:0]     cfg_addr;
  logic [CFG_WORD_W-1:0] cfg_wdata;
  cfg_image_t            image;
  io_cfg_t               io_cfg;
  core_cfg_t             core_cfg;

  config_memory u_cfg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (cfg_we),
    .addr (cfg_addr),
    .wdata(cfg_wdata),
    .image(image)
  );

  always_comb begin
    io_cfg   = io_of(image);
    core_cfg = core_of(image);
  end

  // ---------------- working regions ----------------
  logic                   region_clr_ctrl, mon_clr_ctrl;
  logic [LFSR_WIDTH-1:0]  r1_state, r2_state;
  logic [NUM_OUTPUTS-1:0] r1_out, r2_out;

  lfsr_system_function u_region1 (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (sys_clr | region_clr_ctrl),
    .en   (in1_en),
    .taps (core_cfg.taps1),
    .state(r1_state),
    .out  (r1_out)
  );

  lfsr_system_function u_region2 (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (sys_clr | region_clr_ctrl),
    .en   (in2_en),
    .taps (core_cfg.taps2),
    .state(r2_state),
    .out  (r2_out)
  );

  // ---------------- output buffers and isolation ----------------
  logic                   buf_en;
  logic [NUM_OUTPUTS-1:0] pad_q, pad2_q, mon_a, mon_b;

  for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_out
    io_buffer #(.OE_ACTIVE_HIGH(OE_ACTIVE_HIGH)) u_iob (
      .d           (r1_out[k]),
      .t           (buf_en),
      .cfg_drive_en(io_cfg.drive_en[k]),
      .cfg_pull_en (io_cfg.pull_en[k]),
      .cfg_pull_up (io_cfg.pull_up[k]),
      .pad_i       (pad_i[k]),
      .pad_o       (pad_o[k]),
      .pad_oe      (pad_oe[k]),
      .pad_pull_en (pad_pull_en[k]),
      .pad_pull_up (pad_pull_up[k]),
      .q           (pad_q[k])
    );

    plb_lut3 u_iso1 (
      .init(core_cfg.iso1_init[k]),
      .i   ({2'b00, PAD_READBACK ? pad_q[k] : r1_out[k]}),
      .y   (mon_a[k])
    );

    plb_lut3 u_iso2 (
      .init(core_cfg.iso2_init[k]),
      .i   ({2'b00, (PAD_READBACK && OUTPUT_SETS == 2) ? pad2_q[k] : r2_out[k]}),
      .y   (mon_b[k])
    );
  end

  // Region 2's own output set: same configuration and enable as region 1's.
  if (OUTPUT_SETS == 2) begin : g_set2
    for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_out2
      io_buffer #(.OE_ACTIVE_HIGH(OE_ACTIVE_HIGH)) u_iob2 (
        .d           (r2_out[k]),
        .t           (buf_en),
        .cfg_drive_en(io_cfg.drive_en[k]),
        .cfg_pull_en (io_cfg.pull_en[k]),
        .cfg_pull_up (io_cfg.pull_up[k]),
        .pad_i       (pad2_i[k]),
        .pad_o       (pad2_o[k]),
        .pad_oe      (pad2_oe[k]),
        .pad_pull_en (pad2_pull_en[k]),
        .pad_pull_up (pad2_pull_up[k]),
        .q           (pad2_q[k])
      );
    end
  end else begin : g_set1
    always_comb begin
      pad2_o       = '0;
      pad2_oe      = '0;
      pad2_pull_en = '0;
      pad2_pull_up = '0;
      pad2_q       = '0;
    end
  end

  // ---------------- fault monitors (guard band) ----------------
  fault_monitor_bank #(
    .NUM_OUT    (NUM_OUTPUTS),
    .REPLICAS   (MON_REPLICAS),
    .ACTIVE_HIGH(OE_ACTIVE_HIGH)
  ) u_mon (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (mon_clr | mon_clr_ctrl),
    .a      (mon_a),
    .b      (mon_b),
    .oe     (buf_en),
    .ok     (fail_irq_n),
    .tripped(tripped)
  );

  // ---------------- interrupt routine ----------------
  fail_silent_controller #(
    .IO_SAFE((IO_WORDS*CFG_WORD_W)'(io_inactive(PULL_UP)))
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .irq_n          (fail_irq_n),
    .scrub_mode     (scrub_mode),
    .power_down_en  (power_down_en),
    .golden         (golden_cfg),
    .host_we        (host_we),
    .host_addr      (host_addr),
    .host_wdata     (host_wdata),
    .cfg_we         (cfg_we),
    .cfg_addr       (cfg_addr),
    .cfg_wdata      (cfg_wdata),
    .region_clr     (region_clr_ctrl),
    .mon_clr        (mon_clr_ctrl),
    .busy           (ctrl_busy),
    .failed         (failed),
    .core_power_down(core_power_down),
    .seu_count      (seu_count)
  );

  // ---------------- guard-banded TMR ----------------
  logic [2:0][NUM_OUTPUTS-1:0] tmr_mod_out;
  logic [2:0][LFSR_WIDTH-1:0]  tmr_state;
  logic [NUM_OUTPUTS-1:0]      tmr_disagree;

  for (genvar m = 0; m < 3; m++) begin : g_tmr
    lfsr_system_function u_module (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (1'b0),
      .en   (tmr_en),
      .taps (tmr_taps[m]),
      .state(tmr_state[m]),
      .out  (tmr_mod_out[m])
    );
  end

  tmr_voter u_voter (
    .a       (tmr_mod_out[0]),
    .b       (tmr_mod_out[1]),
    .c       (tmr_mod_out[2]),
    .y       (tmr_out),
    .disagree(tmr_disagree),
    .outvoted(tmr_outvoted)
  );
endmodule
