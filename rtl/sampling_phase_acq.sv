// sampling_phase_acq: estimate of the sampling phase of one antenna.
//
// Three short preambles are sampled at eps, eps - M/4 and eps + M/4 (quarter
// period steps made by the sequencer); their timing detection values are kept
// in the registers TD(eps), TD(eps-90) and TD(eps+90), selected by td_sel.
// Writing TD(eps+90), the last of the three, starts the decision:
//   dir1 = TD(eps) - TD(eps-90),  dir2 = TD(eps) - TD(eps+90)
// choose one of eight regions, and the region's centre is the estimate of eps
// in clock phases.  est_valid pulses one clock after that write.
// Registers and subtractors follow the architecture figure; starting on the
// third write is this design's choice.
module sampling_phase_acq
  import fdts_pkg::*;
#(
  parameter int TDW      = 28,
  parameter int M_PHASES = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  td_valid,
  input  logic [TDW-1:0]        td,
  input  td_sel_e               td_sel,
  output logic                  est_valid,
  output logic [2:0]            region,
  output logic signed [PHW-1:0] est_phase
);
  logic [TDW-1:0]          td_m, td_0, td_p;
  logic                    go;
  logic signed [TDW:0]     dir1, dir2;
  logic [2:0]              reg_c;
  logic signed [PHW-1:0]   ph_c;

  always_comb begin
    dir1 = $signed({1'b0, td_0}) - $signed({1'b0, td_m});
    dir2 = $signed({1'b0, td_0}) - $signed({1'b0, td_p});
  end

  decision_region #(.DIRW(TDW + 1)) u_dec (.dir1, .dir2, .region(reg_c));
  phase_mapping   #(.M_PHASES(M_PHASES)) u_map (.region(reg_c), .phase(ph_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      td_m <= '0; td_0 <= '0; td_p <= '0; go <= 1'b0;
      est_valid <= 1'b0; region <= '0; est_phase <= '0;
    end else begin
      go        <= 1'b0;
      est_valid <= 1'b0;
      if (clear) begin
        td_m <= '0; td_0 <= '0; td_p <= '0;
      end else begin
        if (td_valid) begin
          unique case (td_sel)
            TD_ZERO:  td_0 <= td;
            TD_MINUS: td_m <= td;
            TD_PLUS:  begin td_p <= td; go <= 1'b1; end
            default:  ;
          endcase
        end
        if (go) begin
          region    <= reg_c;
          est_phase <= ph_c;
          est_valid <= 1'b1;
        end
      end
    end
  end
endmodule
