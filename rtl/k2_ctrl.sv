// k2_ctrl - sequencer of the K2 keystream generator.
//
// States: IDLE -> KEYSCHED -> LOAD -> PRIME -> INIT -> RUN.
//   KEYSCHED  the key schedule expands the key (key_start is issued with start);
//   LOAD      sched_start = 1 for one clock: the expanded key and the IV are written
//             into FSR-A/FSR-B and R1, R2, L1, L2 are cleared;
//   PRIME     one clock without a step, so that the look-ahead registers of the
//             pipelined nonlinear functions are filled from the loaded state;
//   INIT      24 steps with the keystream fed back into both shift registers
//             (init_mode = 1);
//   RUN       keystream_valid = 1; the cipher steps (doing = 1) in each clock where
//             the consumer takes the word (ready = 1) and holds otherwise (stall).
// A start in any state begins a new key/IV set-up. The LOAD/doing split follows the
// shared-datapath organisation where one "start schedule" signal loads the state and
// "doing" clocks it; the PRIME clock and the valid/ready handshake are this design's
// choices.
// Timing: valid rises 10 (key schedule) + 1 + 1 + 24 + 1 = 37 clocks after start.
module k2_ctrl
  import k2_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic key_done,      // key schedule finished
  input  logic ready,         // consumer takes the keystream word
  output logic key_start,
  output logic sched_start,   // load FSRs, clear R1/R2/L1/L2
  output logic doing,         // step the cipher this clock
  output logic init_mode,     // feed the keystream back (initialisation clocks)
  output logic valid,         // keystream word on the output is valid
  output logic busy           // setting up a new key/IV
);

  typedef enum logic [2:0] {S_IDLE, S_KEYSCHED, S_LOAD, S_PRIME, S_INIT, S_RUN} state_t;

  state_t     state;
  logic [4:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else if (start) begin
      state <= S_KEYSCHED;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE:     state <= S_IDLE;
        S_KEYSCHED: if (key_done) state <= S_LOAD;
        S_LOAD:     state <= S_PRIME;
        S_PRIME:    state <= S_INIT;
        S_INIT: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'(INIT_CLOCKS - 1)) state <= S_RUN;
        end
        S_RUN:      state <= S_RUN;
        default:    state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    key_start   = start;
    sched_start = 1'b0;
    init_mode   = 1'b0;
    valid       = 1'b0;
    doing       = 1'b0;
    busy        = start;
    if (!start) begin
      unique case (state)
        S_KEYSCHED, S_PRIME: busy = 1'b1;
        S_LOAD:   begin busy = 1'b1; sched_start = 1'b1; end
        S_INIT:   begin busy = 1'b1; init_mode = 1'b1; doing = 1'b1; end
        S_RUN:    begin valid = 1'b1; doing = ready; end
        default:  ;
      endcase
    end
  end

endmodule
