// fail_silent_controller: the interrupt routine that takes the device silent.
//
// The fault monitors' combined status is an active-low interrupt line
// (irq_n). A falling edge of it starts one of two sequences, chosen by
// scrub_mode when the edge arrives:
//
//   shutdown (scrub_mode = 0), the fail-silent response:
//     IO_OFF   rewrite the I/O configuration words so that every output buffer
//              becomes an input buffer with a weak pull (PULL_UP selects the
//              direction); its tri-state control can no longer enable it.
//     ERASE    write 0, the un-programmed value, to every core configuration
//              word, one word per cycle. The I/O words keep the safe setting.
//     NOTIFY   raise failed (sticky) and, if power_down_en, core_power_down.
//     HALTED   stay here until rst_n; processor writes are no longer passed on.
//   scrub (scrub_mode = 1), the response to a configuration upset:
//     SCRUB    write every word of the known-good image golden, one per cycle.
//     RESTART  one cycle of region_clr and mon_clr, restarting both system
//              functions in step and re-arming the monitors; seu_count + 1.
//
// While IDLE the processor's own writes (host_*) pass to the configuration
// port unchanged; while a sequence runs, the controller owns the port and
// host writes are dropped. Timing: the sequence starts at the first clock edge
// at which irq_n is low after having been high (the previous level is kept in
// a register), and its first write goes out in the next cycle. Shutdown then
// takes IO_WORDS + CORE_WORDS write cycles and one notify cycle; scrub takes
// CFG_WORDS write cycles and one restart cycle.
//
// The trigger (falling-edge interrupt), the order "outputs inactive, then
// erase the configuration", notification, optional power-down and scrubbing
// on the interrupt follow the described use of the embedded processor; doing
// it in a state machine, the restart after a scrub, dropping host writes and
// the status outputs are this design's choices.
module fail_silent_controller #(
  parameter int unsigned CFG_WORDS  = fs_pkg::CFG_WORDS,
  parameter int unsigned IO_WORDS   = fs_pkg::IO_WORDS,
  parameter int unsigned CFG_WORD_W = fs_pkg::CFG_WORD_W,
  parameter int unsigned CFG_AW     = fs_pkg::CFG_AW,
  parameter logic [IO_WORDS*CFG_WORD_W-1:0] IO_SAFE =
      (IO_WORDS*CFG_WORD_W)'(fs_pkg::io_inactive(1'b1))
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            irq_n,         // fault monitors: 1 ok, 0 fault
  input  logic                            scrub_mode,    // 1: scrub and restart, 0: shut down
  input  logic                            power_down_en, // power the core down on shutdown
  input  logic [CFG_WORDS*CFG_WORD_W-1:0] golden,        // known-good configuration image
  input  logic                            host_we,       // processor write port
  input  logic [CFG_AW-1:0]               host_addr,
  input  logic [CFG_WORD_W-1:0]           host_wdata,
  output logic                            cfg_we,        // to configuration memory
  output logic [CFG_AW-1:0]               cfg_addr,
  output logic [CFG_WORD_W-1:0]           cfg_wdata,
  output logic                            region_clr,    // restart both system functions
  output logic                            mon_clr,       // re-arm the fault monitors
  output logic                            busy,
  output logic                            failed,        // failure notification (sticky)
  output logic                            core_power_down,
  output logic [15:0]                     seu_count      // completed scrubs
);
  typedef enum logic [2:0] {
    S_IDLE, S_IO_OFF, S_ERASE, S_NOTIFY, S_HALTED, S_SCRUB, S_RESTART
  } state_t;

  state_t            state;
  logic [CFG_AW-1:0] idx;
  logic              irq_prev;
  logic              irq_fall;

  localparam logic [CFG_AW-1:0] LAST_IO  = CFG_AW'(IO_WORDS - 1);
  localparam logic [CFG_AW-1:0] LAST_CFG = CFG_AW'(CFG_WORDS - 1);

  always_comb irq_fall = irq_prev & ~irq_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      idx             <= '0;
      irq_prev        <= 1'b1;
      failed          <= 1'b0;
      core_power_down <= 1'b0;
      seu_count       <= '0;
    end else begin
      irq_prev <= irq_n;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (irq_fall) state <= scrub_mode ? S_SCRUB : S_IO_OFF;
        end
        S_IO_OFF: begin
          if (idx == LAST_IO) begin
            state <= (IO_WORDS == CFG_WORDS) ? S_NOTIFY : S_ERASE;
          end
          idx <= idx + 1'b1;
        end
        S_ERASE: begin
          if (idx == LAST_CFG) state <= S_NOTIFY;
          idx <= idx + 1'b1;
        end
        S_NOTIFY: begin
          failed          <= 1'b1;
          core_power_down <= power_down_en;
          state           <= S_HALTED;
        end
        S_HALTED: state <= S_HALTED;
        S_SCRUB: begin
          if (idx == LAST_CFG) state <= S_RESTART;
          idx <= idx + 1'b1;
        end
        S_RESTART: begin
          seu_count <= seu_count + 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cfg_we     = 1'b0;
    cfg_addr   = idx;
    cfg_wdata  = '0;
    region_clr = 1'b0;
    mon_clr    = 1'b0;
    busy       = (state != S_IDLE);
    unique case (state)
      S_IDLE: begin
        cfg_we    = host_we;
        cfg_addr  = host_addr;
        cfg_wdata = host_wdata;
      end
      S_IO_OFF: begin
        cfg_we    = 1'b1;
        cfg_wdata = IO_SAFE[32'(idx)*CFG_WORD_W +: CFG_WORD_W];
      end
      S_ERASE: begin
        cfg_we    = 1'b1;
        cfg_wdata = '0;
      end
      S_SCRUB: begin
        cfg_we    = 1'b1;
        cfg_wdata = golden[32'(idx)*CFG_WORD_W +: CFG_WORD_W];
      end
      S_RESTART: begin
        region_clr = 1'b1;
        mon_clr    = 1'b1;
      end
      default: ;
    endcase
  end

  // A sequence never writes outside the configuration memory.
  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      (cfg_we && busy) |-> (32'(cfg_addr) < CFG_WORDS));
endmodule
