// sync_controller: six-preamble schedule of the timing synchronizer.
//
// Clock offset estimation and phase acquisition share the first six short
// preambles of a packet (counted from pkt_start):
//   preamble 1  stored in bank 0
//   preamble 2  paired with 1 (m = 1)                  -> SCO1
//               SCO1 is loaded into the phase translator (compensation 1)
//   preamble 3  stored in bank 1
//   preamble 4  paired with 3 (m = 1), loads TD(eps)   -> SCO3 (residual)
//               step M1 = -M/4 - d3, d3 = SCO3*N*M = drift of one preamble
//   preamble 5  paired with 3 (m = 2, step M1 removed), loads TD(eps-M/4)
//                                                       -> SCO2 (residual)
//               step M2 - M1, M2 = +M/4 - 2*d3
//   preamble 6  loads TD(eps+M/4)                      -> estimated phase
//   then        step -M2 - phase2, phase2 = est + 3*SCO2*N*M (the residual
//               drift from preamble 4 to the end of preamble 6), and the
//               translator rate becomes SCO1 + SCO2 (compensation 2).
// So preambles 5 and 6 are sampled a quarter period before and after
// preamble 4 even while a residual offset keeps moving the sampling instant.
// Inputs: the bin stream (to count preambles) and the antenna-averaged SCO
// and phase results, which arrive in the order SCO1, SCO3, SCO2, phase.
// `ready` is high when the next preamble may start; it drops after
// preambles 2 and 4 until SCO1 is loaded and M1 is issued, because those must
// act on the next preamble.  `done` stays high from the last step until the
// next pkt_start.  The schedule and the M1, M2 and phase2 rules follow the
// document; the bank use, the ready handshake and rounding are this design's.
module sync_controller
  import fdts_pkg::*;
#(
  parameter int N_FFT    = 16,
  parameter int M_PHASES = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pkt_start,
  input  logic                     bin_valid,
  input  logic [$clog2(N_FFT)-1:0] bin_idx,
  input  logic                     sco_valid,
  input  logic signed [DLW-1:0]    sco_delta,
  input  logic                     ph_valid,
  input  logic signed [PHW-1:0]    ph_est,
  output ant_ctrl_t                ctrl,
  output logic                     clear,
  output logic                     ready,
  output logic                     done,
  output logic                     step_valid,
  output logic signed [PHW-1:0]    step,
  output logic                     delta_load,
  output logic signed [DLW-1:0]    delta_out,
  output logic signed [DLW-1:0]    sco1,
  output logic signed [DLW-1:0]    sco2,
  output logic signed [DLW-1:0]    sco3,
  output logic signed [PHW-1:0]    est_phase,
  output logic signed [PHW-1:0]    phase2
);
  localparam int NSH = $clog2(N_FFT * M_PHASES);   // d = delta * N * M
  localparam int QW  = DLW + NSH + 4;
  localparam logic signed [QW-1:0] QUARTER = QW'(M_PHASES / 4) <<< DFB;

  typedef enum logic [1:0] {R_SCO1, R_SCO3, R_SCO2, R_NONE} res_e;

  logic [2:0]             pcnt;       // preambles completed
  res_e                   next_res;   // which SCO result comes next
  logic                   have_ph, m2_done;
  logic signed [PHW-1:0]  m1, m2;

  function automatic logic signed [PHW-1:0] rnd(input logic signed [QW-1:0] x);
    return PHW'((x + (QW'(1) <<< (DFB - 1))) >>> DFB);
  endfunction

  logic signed [QW-1:0] d3, d2;
  always_comb begin
    d3 = QW'(sco_delta) <<< NSH;
    d2 = QW'(sco2) <<< NSH;
  end

  // per-preamble commands, from the number of preambles already seen
  always_comb begin
    ctrl = '0;
    ctrl.td_sel = TD_NONE;
    unique case (pcnt)
      3'd0: begin ctrl.store_en = 1'b1; ctrl.store_bank = 1'b0; end
      3'd1: begin ctrl.pair_en = 1'b1; ctrl.ref_bank = 1'b0; end
      3'd2: begin ctrl.store_en = 1'b1; ctrl.store_bank = 1'b1; end
      3'd3: begin ctrl.pair_en = 1'b1; ctrl.ref_bank = 1'b1; ctrl.td_sel = TD_ZERO; end
      3'd4: begin ctrl.pair_en = 1'b1; ctrl.ref_bank = 1'b1; ctrl.m_log2 = 1'b1;
                  ctrl.h = m1; ctrl.td_sel = TD_MINUS; end
      3'd5: begin ctrl.td_sel = TD_PLUS; end
      default: ;
    endcase
  end

  // ready only once a clear, a phase step or a rate load has taken effect
  always_comb begin
    unique case (pcnt)
      3'd2:    ready = (next_res != R_SCO1);
      3'd4:    ready = (next_res == R_SCO2 || next_res == R_NONE);
      3'd5:    ready = m2_done;
      3'd6, 3'd7: ready = 1'b0;
      default: ready = 1'b1;
    endcase
    if (clear || step_valid || delta_load) ready = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; next_res <= R_SCO1; have_ph <= 1'b0; m2_done <= 1'b0;
      m1 <= '0; m2 <= '0; clear <= 1'b0; done <= 1'b0;
      step_valid <= 1'b0; step <= '0; delta_load <= 1'b0; delta_out <= '0;
      sco1 <= '0; sco2 <= '0; sco3 <= '0; est_phase <= '0; phase2 <= '0;
    end else begin
      clear      <= 1'b0;
      step_valid <= 1'b0;
      delta_load <= 1'b0;
      if (pkt_start) begin
        pcnt <= '0; next_res <= R_SCO1; have_ph <= 1'b0; m2_done <= 1'b0;
        m1 <= '0; m2 <= '0; done <= 1'b0; clear <= 1'b1;
        delta_out <= '0;
      end else begin
        if (bin_valid && bin_idx == $clog2(N_FFT)'(N_FFT - 1) && pcnt < 3'd6) begin
          pcnt <= pcnt + 1'b1;
          if (pcnt == 3'd4) begin
            // end of preamble 5: move from eps - M/4 to eps + M/4
            step_valid <= 1'b1;
            step       <= m2 - m1;
            m2_done    <= 1'b1;
          end
        end
        if (sco_valid) begin
          unique case (next_res)
            R_SCO1: begin
              sco1       <= sco_delta;
              delta_out  <= sco_delta;
              delta_load <= 1'b1;
              next_res   <= R_SCO3;
            end
            R_SCO3: begin
              sco3       <= sco_delta;
              m1         <= rnd(-QUARTER - d3);
              m2         <= rnd(QUARTER - (d3 <<< 1));
              step_valid <= 1'b1;
              step       <= rnd(-QUARTER - d3);
              next_res   <= R_SCO2;
            end
            R_SCO2: begin
              sco2     <= sco_delta;
              next_res <= R_NONE;
            end
            default: ;
          endcase
        end
        if (ph_valid) begin
          est_phase <= ph_est;
          have_ph   <= 1'b1;
        end
        if (have_ph && next_res == R_NONE && pcnt == 3'd6 && !done && !sco_valid) begin
          phase2     <= rnd((QW'(est_phase) <<< DFB) + 3 * d2);
          step_valid <= 1'b1;
          step       <= -m2 - rnd((QW'(est_phase) <<< DFB) + 3 * d2);
          delta_out  <= sco1 + sco2;
          delta_load <= 1'b1;
          done       <= 1'b1;
        end
      end
    end
  end
endmodule
