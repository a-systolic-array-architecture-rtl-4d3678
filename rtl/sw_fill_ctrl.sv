// Fill sequencer for one synchronous pass of the systolic array.
//
// States: IDLE -> FILL -> DONE. A start_i pulse seen while not busy
// (IDLE or DONE) raises clr_o and load_o for that cycle: at the same clock
// edge the cells are cleared (initialisation step, H = 0) and the caller
// registers its new inputs. The sequencer then holds en_o high for exactly
// CYCLES clocks (ROWS+COLS-1, one per anti-diagonal) and enters DONE, where
// done_o stays high until the next start. start_i while busy_o is ignored.
//
// Timing: start_i sampled at edge 0, fill edges 1..CYCLES, done_o high right
// after edge CYCLES. cycle_o counts the fill edges done so far.
//
// The one-anti-diagonal-per-clock fill and its length follow the
// architecture; the start/done handshake and the state machine are this
// design's own.
module sw_fill_ctrl #(
  parameter int CYCLES = 7,
  parameter int CNT_W  = (CYCLES < 2) ? 1 : $clog2(CYCLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  output logic             clr_o,
  output logic             load_o,
  output logic             en_o,
  output logic             busy_o,
  output logic             done_o,
  output logic [CNT_W-1:0] cycle_o
);

  typedef enum logic [1:0] {IDLE, FILL, DONE} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;

  always_comb begin
    busy_o  = (state == FILL);
    done_o  = (state == DONE);
    en_o    = busy_o;
    load_o  = start_i && !busy_o;
    clr_o   = load_o;
    cycle_o = cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else if (load_o) begin
      state <= FILL;
      cnt   <= '0;
    end else if (state == FILL) begin
      cnt <= cnt + 1'b1;
      if (cnt == CNT_W'(CYCLES - 1)) state <= DONE;
    end
  end

  // The fill never runs past CYCLES clocks.
  a_cnt_bound: assert property (@(posedge clk) disable iff (!rst_n)
    cnt <= CNT_W'(CYCLES));

endmodule
