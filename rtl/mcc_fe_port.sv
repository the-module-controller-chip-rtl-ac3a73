// mcc_fe_port: digital side of the MCC's I/O to the FE chips and to the ROD data line,
// including the "transparent mode".
//
// In normal operation every signal between the MCC core and the FE chips passes a
// flip-flop clocked by the module clock, since the paper has the MCC latch all its
// input/output data with the clock it distributes: the 16 FE data lines (DTI) on
// the way in, and trigger (LV1), SYNC, serial configuration data (DAO), load (LD),
// configuration clock (CCK) and the MCC's own output data (DTO) on the way out.
//
// Transparent mode (TM pin high) bypasses the MCC: as in the paper, the FE-side
// control lines are driven straight from external pins (LV1T, SYNCT, LDT, CCKT and
// DCI for the data line) and the data line of one FE chip is routed straight to
// DTO, without any flip-flop. Which FE chip is routed is this design's choice: the
// FE-select register, written before TM is raised. In this mode the receivers see
// idle lines. The LVDS and CMOS pad drivers themselves are analog and not modelled;
// the test-port pins RSI/STRI/RSO/STRO of the transparent-mode figure are not
// described and not built.
//
// Timing: one clock of latency each way in normal mode, none in transparent mode.
module mcc_fe_port
  import mcc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tm,
  input  logic [3:0]      fe_sel,
  // FE-side pins
  input  logic [N_FE-1:0] dti,
  output logic            fe_lv1,
  output logic            fe_sync,
  output logic            fe_dao,
  output logic            fe_ld,
  output logic            fe_cck,
  // transparent-mode pins
  input  logic            lv1t,
  input  logic            synct,
  input  logic            dci,
  input  logic            ldt,
  input  logic            cckt,
  // ROD-side data pin
  output logic            dto,
  // MCC core
  output logic [N_FE-1:0] core_dti,
  output logic            core_sel_dti,   // data line of the selected FE, registered
  input  logic            core_lv1,
  input  logic            core_sync,
  input  logic            core_dao,
  input  logic            core_ld,
  input  logic            core_cck,
  input  logic            core_dto
);

  logic [N_FE-1:0] dti_q;
  logic            lv1_q, sync_q, dao_q, ld_q, cck_q, dto_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dti_q  <= '0;
      lv1_q  <= 1'b0;
      sync_q <= 1'b0;
      dao_q  <= 1'b0;
      ld_q   <= 1'b0;
      cck_q  <= 1'b0;
      dto_q  <= 1'b0;
    end else begin
      dti_q  <= tm ? '0 : dti;
      lv1_q  <= core_lv1;
      sync_q <= core_sync;
      dao_q  <= core_dao;
      ld_q   <= core_ld;
      cck_q  <= core_cck;
      dto_q  <= core_dto;
    end
  end

  assign core_dti     = dti_q;
  assign core_sel_dti = dti_q[fe_sel];

  assign fe_lv1  = tm ? lv1t         : lv1_q;
  assign fe_sync = tm ? synct        : sync_q;
  assign fe_dao  = tm ? dci          : dao_q;
  assign fe_ld   = tm ? ldt          : ld_q;
  assign fe_cck  = tm ? cckt         : cck_q;
  assign dto     = tm ? dti[fe_sel]  : dto_q;

endmodule
