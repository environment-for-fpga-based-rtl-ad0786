// emu_fsm - controller of the fault emulation environment with fault dropping.
//
// It runs, in hardware, the loop
//   for every fault {
//     reset the stimulus LFSR to its seed;
//     for every test sequence {
//       reset CUT and GOLD;
//       for every test vector {
//         apply the vector to CUT and GOLD, compare their outputs;
//         if they differ: the fault is detected, drop the rest of its test;
//       }
//     }
//     report the fault as detected or undetected;
//   }
// The three loop indices live in external counters (vector, sequence and
// fault counter); the FSM clears and increments them and reads their `last`
// flags. Comparison is on the fly: in ST_EMULATE the comparator verdict for
// the vector now applied is used in the same cycle, so a detected fault
// costs no extra clock and the vector that revealed it is not clocked into
// the circuits.
//
// Timing: one test vector per clock in ST_EMULATE. An undetected fault takes
//   1 (load seed) + num_seq * (1 (reset CUT) + seq_len) + 1 (report)
// cycles when the host accepts the report at once; a fault detected at
// vector v of sequence s takes 1 + s * (1 + seq_len) + 1 + (v + 1) + 1.
// `cycles` counts the clocks spent in ST_EMULATE (emulated vectors) since the
// last start. The report is a valid/ready handshake: it is held stable until
// accepted.
// The loop structure and fault dropping follow the environment's algorithm;
// the state encoding, the one-cycle reset states and the report contents are
// this design's choice.
module emu_fsm
  import fe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // control from the host interface
  input  logic               start,
  output logic               busy,
  output logic               done,      // one-cycle pulse after the last report
  output logic [CYCLE_W-1:0] cycles,    // emulated vectors since start
  // counters
  output logic               vec_clr, vec_inc,
  output logic               seq_clr, seq_inc,
  output logic               flt_clr, flt_inc,
  input  cnt_t               vec_cnt, seq_cnt, flt_cnt,
  input  logic               vec_last, seq_last, flt_last,
  // stimulus generator
  output logic               lfsr_reset,
  output logic               lfsr_en,
  // CUT-top
  output logic               cut_rst,
  output logic               cut_en,
  output logic               fault_valid,
  input  logic               differ,    // comparator verdict
  // report stream
  output logic               rep_valid,
  input  logic               rep_ready,
  output report_t            rep_data
);
  state_t state, state_n;
  report_t rep_n;

  always_comb begin
    state_n    = state;
    rep_n      = rep_data;
    vec_clr    = 1'b0; vec_inc = 1'b0;
    seq_clr    = 1'b0; seq_inc = 1'b0;
    flt_clr    = 1'b0; flt_inc = 1'b0;
    lfsr_reset = 1'b0; lfsr_en = 1'b0;
    cut_rst    = 1'b0; cut_en  = 1'b0;

    unique case (state)
      ST_IDLE:
        if (start) begin
          flt_clr = 1'b1;
          state_n = ST_RESET_LFSR;
        end
      ST_RESET_LFSR: begin                 // reset_LFSR
        lfsr_reset = 1'b1;
        lfsr_en    = 1'b1;
        seq_clr    = 1'b1;
        state_n    = ST_RESET_CUT;
      end
      ST_RESET_CUT: begin                  // reset_CUT; reset_GOLD
        cut_rst = 1'b1;
        cut_en  = 1'b1;
        vec_clr = 1'b1;
        state_n = ST_EMULATE;
      end
      ST_EMULATE:
        if (differ) begin                  // outputs differ: drop the fault
          rep_n   = '{fault: flt_cnt, detected: 1'b1, seq: seq_cnt, vec: vec_cnt};
          state_n = ST_REPORT;
        end else begin                     // emulate_CUT; emulate_GOLD
          cut_en  = 1'b1;
          lfsr_en = 1'b1;
          vec_inc = 1'b1;
          if (vec_last) begin
            if (seq_last) begin
              rep_n   = '{fault: flt_cnt, detected: 1'b0, seq: '0, vec: '0};
              state_n = ST_REPORT;
            end else begin
              seq_inc = 1'b1;
              state_n = ST_RESET_CUT;
            end
          end
        end
      ST_REPORT:                           // send_report
        if (rep_ready) begin
          if (flt_last) state_n = ST_DONE;
          else begin
            flt_inc = 1'b1;
            state_n = ST_RESET_LFSR;
          end
        end
      ST_DONE:
        state_n = ST_IDLE;
      default:
        state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= ST_IDLE;
      rep_data <= '0;
      cycles   <= '0;
    end else begin
      state    <= state_n;
      rep_data <= rep_n;
      if (state == ST_IDLE && start)  cycles <= '0;
      else if (state == ST_EMULATE)   cycles <= cycles + 1'b1;
    end

  always_comb begin
    busy        = (state != ST_IDLE);
    done        = (state == ST_DONE);
    rep_valid   = (state == ST_REPORT);
    fault_valid = (state != ST_IDLE) && (state != ST_DONE);
  end

  // Report handshake: once offered, a report stays until it is taken.
  a_rep_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rep_valid && !rep_ready |=> rep_valid && $stable(rep_data))
    else $error("emu_fsm: report changed before it was accepted");
endmodule
