// conversion_sequencer: generates the global signals of one frame.
//
// On start the sequencer runs, in order:
//   CRST   counter reset: RST and CNT_FORCE high for nine steps of PHI1UP
//          then PHI2, which shifts ones through every counter (all-ones word);
//   RSTA   RSTA high for RSTA_CYCLES: every sense node is reset;
//   PRIME1 one PHI2 with RAMP at RAMP_START: every comparator latch reads
//          'count' (skipped with the rest of the first sample when cds_en=0);
//   DOWN   N_DOWN steps with CNT_EN high; step j sets RAMP to
//          RAMP_START - j*RAMP_STEP, pulses PHI1DOWN (cycle 1) then PHI2
//          (cycle 2); counters whose comparator has flipped stop;
//   XFER   TRANSFER_CYCLES with RAMP at the top (comparators off); in the
//          middle half PG is low and TG high, moving the photo charge;
//   PRIME2 and UP as PRIME1 and DOWN, counting up with PHI1UP for N_UP steps;
//   DONE   one cycle with done high; RAMP back at the top, CNT_EN low, so
//          every counter holds its value statically for readout.
// CNT_EN drops right after the last PHI2 of each sample, stopping counters
// that never saw their comparator flip. ref_clear marks the start of each
// sample and ref_advance each finished step, for the REF generator.
//
// The order of the phases and the signals in each follow the published
// timing diagram and text. Pulse lengths, the idle levels (PG high, TG low,
// RAMP at the top) and the placement of the counter reset before the
// sense-node reset (the same order over repeated frames, with readout in
// between) are this design's choices. One step takes two clock cycles.
module conversion_sequencer
  import pixel_pkg::*;
#(
  parameter int N_DOWN          = 511,
  parameter int N_UP            = 511,
  parameter int RAMP_START      = 3640,  // 1.6 V on a 1.8 V, 12-bit scale
  parameter int RAMP_STEP       = 6,     // about 2.6 mV per count
  parameter int RAMP_OFF        = 4095,  // 1.8 V: comparator powered down
  parameter int RSTA_CYCLES     = 8,
  parameter int TRANSFER_CYCLES = 80,
  parameter int RST_STEPS       = pixel_pkg::NBITS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      cds_en,
  output pix_ctrl_t ctrl,
  output logic      ref_clear,
  output logic      ref_advance,
  output logic      busy,
  output logic      done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CRST, S_RSTA, S_PRIME1, S_DOWN, S_XFER, S_PRIME2, S_UP, S_DONE
  } state_t;

  state_t      state;
  logic [15:0] cnt;    // step or cycle counter of the current phase
  logic        ph;     // 0: phase-1 cycle, 1: phase-2 cycle of a step
  logic        cds_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      ph    <= 1'b0;
      cds_q <= 1'b1;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_CRST; cnt <= '0; ph <= 1'b0; cds_q <= cds_en;
        end
        S_CRST: begin
          ph <= ~ph;
          if (ph) begin
            if (cnt == 16'(RST_STEPS - 1)) begin state <= S_RSTA; cnt <= '0; end
            else cnt <= cnt + 1'b1;
          end
        end
        S_RSTA:
          if (cnt == 16'(RSTA_CYCLES - 1)) begin
            state <= cds_q ? S_PRIME1 : S_XFER; cnt <= '0;
          end else cnt <= cnt + 1'b1;
        S_PRIME1: begin state <= S_DOWN; cnt <= '0; ph <= 1'b0; end
        S_DOWN: begin
          ph <= ~ph;
          if (ph) begin
            if (cnt == 16'(N_DOWN - 1)) begin state <= S_XFER; cnt <= '0; end
            else cnt <= cnt + 1'b1;
          end
        end
        S_XFER:
          if (cnt == 16'(TRANSFER_CYCLES - 1)) begin state <= S_PRIME2; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        S_PRIME2: begin state <= S_UP; cnt <= '0; ph <= 1'b0; end
        S_UP: begin
          ph <= ~ph;
          if (ph) begin
            if (cnt == 16'(N_UP - 1)) begin state <= S_DONE; cnt <= '0; end
            else cnt <= cnt + 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic counting;
  assign counting = (state == S_DOWN) || (state == S_UP);

  always_comb begin
    ctrl            = '0;
    ctrl.pg         = 1'b1;
    ctrl.phi1up_n   = 1'b1;
    ctrl.phi1down_n = 1'b1;
    ctrl.ramp       = ramp_t'(RAMP_OFF);
    ref_clear       = 1'b0;
    ref_advance     = 1'b0;
    case (state)
      S_CRST: begin
        ctrl.rst       = 1'b1;
        ctrl.cnt_force = 1'b1;
        ctrl.phi1up_n  = ph;
        ctrl.phi2      = ph;
      end
      S_RSTA: ctrl.rsta = 1'b1;
      S_PRIME1, S_PRIME2: begin
        ctrl.ramp = ramp_t'(RAMP_START);
        ctrl.phi2 = 1'b1;
        ref_clear = 1'b1;
      end
      S_DOWN, S_UP: begin
        ctrl.cnt_en = 1'b1;
        ctrl.ramp   = ramp_t'(RAMP_START - int'(cnt) * RAMP_STEP);
        if (state == S_DOWN) ctrl.phi1down_n = ph;
        else                 ctrl.phi1up_n   = ph;
        ctrl.phi2   = ph;
        ref_advance = ph;
      end
      S_XFER: begin
        if (cnt >= 16'(TRANSFER_CYCLES / 4) && cnt < 16'(3 * TRANSFER_CYCLES / 4)) begin
          ctrl.pg = 1'b0;
          ctrl.tg = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // Phase-1 and phase-2 pulses never overlap, and the two counting directions
  // are never enabled together.
  a_nonoverlap: assert property (@(posedge clk)
    !(ctrl.phi2 && (!ctrl.phi1up_n || !ctrl.phi1down_n)));
  a_one_dir: assert property (@(posedge clk)
    !(!ctrl.phi1up_n && !ctrl.phi1down_n));
  a_ramp_range: assert property (@(posedge clk)
    !counting || (int'(cnt) * RAMP_STEP <= RAMP_START));

endmodule
