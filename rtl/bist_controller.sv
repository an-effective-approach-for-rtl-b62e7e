// bist_controller: test controller of the MSIC BIST.
//
// On BIST Start it runs one complete test and then raises BIST Done:
//   INIT    L clocks with the Johnson counter in shift-register mode and 0 on
//           its serial input, clearing it; the LFSR is reloaded with its seed.
//   SHIFT   L clocks with scan enable high, col = 0..L-1 choosing the MSIC
//           column; the analyzer folds in the scan-chain outputs (except in
//           the very first window, whose contents predate the test).
//   CAPTURE one clock with scan enable low; the circuit captures, the analyzer
//           folds in the primary outputs and the Johnson counter steps. After
//           every 2L vectors the LFSR steps to a new seed.
//   UNLOAD  after NSEEDS seeds, one more shift window brings out the last
//           responses.
//   PCLOCK  in test-per-clock mode, replaces SHIFT/CAPTURE: one vector per
//           clock, Johnson counter stepping every clock, primary outputs
//           folded every clock.
//   CHECK   one clock comparing the signature; then DONE until Start falls.
// A test-per-scan run takes L + NSEEDS*2L*(L+1) + L + 1 clocks from Start to
// Done, a test-per-clock run L + NSEEDS*2L + 1. The controller's role follows
// the BIST block diagram; the sequence and counts are this design's choices.
//
// Interface: start is level-sensitive (BIST Start); mode picks test-per-scan
// or test-per-clock, sampled in IDLE. Outputs are decoded from the state
// register and counters (Moore).
module bist_controller
  import msic_pkg::*;
#(
  parameter int unsigned L      = 8,
  parameter int unsigned NSEEDS = 255,
  parameter int unsigned CW     = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned VW     = $clog2(2 * L),
  parameter int unsigned SW     = (NSEEDS > 1) ? $clog2(NSEEDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  test_mode_e    mode,
  output logic          test_mode,
  output logic          se,
  output logic [CW-1:0] col,
  output logic          seed_en,
  output logic          seed_load,
  output logic          code_en,
  output logic          rj_mode,
  output logic          jc_init,
  output logic          misr_clr,
  output logic          misr_en,
  output logic          misr_sel_po,
  output logic          check,
  output logic          done,
  output bist_state_e   state
);

  test_mode_e    mode_q;
  logic [CW-1:0] cnt;       // clock within INIT / SHIFT / UNLOAD
  logic [VW-1:0] vec;       // vector number under the current seed
  logic [SW-1:0] seed_cnt;  // seeds used so far
  logic          first;     // first shift window of the run
  logic          last_vec;
  logic          last_seed;

  always_comb begin
    last_vec  = (vec == VW'(2 * L - 1));
    last_seed = (seed_cnt == SW'(NSEEDS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      mode_q   <= MODE_PER_SCAN;
      cnt      <= '0;
      vec      <= '0;
      seed_cnt <= '0;
      first    <= 1'b1;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state  <= ST_INIT;
          mode_q <= mode;
          cnt    <= '0;
        end
        ST_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(L - 1)) begin
            cnt      <= '0;
            vec      <= '0;
            seed_cnt <= '0;
            first    <= 1'b1;
            state    <= (mode_q == MODE_PER_CLOCK) ? ST_PCLOCK : ST_SHIFT;
          end
        end
        ST_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(L - 1)) begin
            cnt   <= '0;
            state <= ST_CAPTURE;
          end
        end
        ST_CAPTURE: begin
          first <= 1'b0;
          vec   <= last_vec ? '0 : vec + 1'b1;
          if (last_vec) seed_cnt <= seed_cnt + 1'b1;
          state <= (last_vec && last_seed) ? ST_UNLOAD : ST_SHIFT;
        end
        ST_PCLOCK: begin
          vec <= last_vec ? '0 : vec + 1'b1;
          if (last_vec) seed_cnt <= seed_cnt + 1'b1;
          if (last_vec && last_seed) state <= ST_CHECK;
        end
        ST_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(L - 1)) begin
            cnt   <= '0;
            state <= ST_CHECK;
          end
        end
        ST_CHECK: state <= ST_DONE;
        ST_DONE:  if (!start) state <= ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    test_mode   = (state != ST_IDLE);
    se          = (state == ST_SHIFT) || (state == ST_UNLOAD);
    col         = cnt;
    seed_load   = (state == ST_INIT);
    seed_en     = ((state == ST_CAPTURE) || (state == ST_PCLOCK)) && last_vec;
    code_en     = (state == ST_INIT) || (state == ST_CAPTURE) || (state == ST_PCLOCK);
    rj_mode     = (state != ST_INIT);
    jc_init     = 1'b0;
    misr_clr    = (state == ST_IDLE) && start;
    misr_en     = (state == ST_SHIFT && !first) || (state == ST_UNLOAD) ||
                  (state == ST_CAPTURE) || (state == ST_PCLOCK);
    misr_sel_po = (state == ST_CAPTURE) || (state == ST_PCLOCK);
    check       = (state == ST_CHECK);
    done        = (state == ST_DONE);
  end

endmodule
