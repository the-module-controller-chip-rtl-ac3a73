// mcc_register_bank: the MCC's configuration and status registers.
//
// The paper provides an address space of 16 general registers, 11 of them built
// in the demonstrator chip, written and read back during configuration. It names a
// mask of FE inputs and the two lengths (address+control part and data part) of
// the bit stream sent to an FE chip; the pending-trigger limit n (1..15) and the
// contiguous-trigger pattern are settings it describes without placing them. The
// register map below, the 16-bit width and the status registers are this design's
// choices (see mcc_pkg::reg_addr_e). Addresses 11..15 read as zero.
//
// Read-back (REC/TRAN in the paper's block diagram): rd_start with rd_addr sends
// the register value on dout as a 1 start bit and 16 data bits, MSB first, as soon
// as tx_allow is high (the event data stream has priority on the shared DTO line).
//
// Interface: we/waddr/wdata write in one clock. Sticky status bits are set by the
// warn_set/err_set pulses and cleared by clear_status (SYNC). Configuration fields
// are decoded onto the outputs. Reset values: n = 15, one trigger per LV1, no mask,
// no ToT, auto-SYNC off, lengths 0.
module mcc_register_bank
  import mcc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [3:0]         waddr,
  input  logic [REG_W-1:0]   wdata,
  input  logic               rd_start,
  input  logic [3:0]         rd_addr,
  input  logic               tx_allow,
  output logic               dout,
  output logic               rd_busy,
  // status
  input  logic               run,
  input  logic [N_FE-1:0]    warn_set,
  input  logic [N_FE-1:0]    err_set,
  input  logic               clear_status,
  input  logic [4:0]         pending,
  input  logic [EVNUM_W-1:0] lv1_count,
  input  logic [REG_W-1:0]   suppressed,
  // configuration
  output logic               tot_en,
  output logic               autosync_en,
  output logic [3:0]         max_pending,
  output logic [3:0]         burst_m1,
  output logic [N_FE-1:0]    fe_mask,
  output logic [REG_W-1:0]   cmd_len,
  output logic [REG_W-1:0]   data_len,
  output logic [3:0]         fe_sel
);

  logic [REG_W-1:0] csr, lv1cfg, femask, cmdlen, datalen, warn_r, err_r, fesel;
  logic [REG_W-1:0] rd_value;
  logic [REG_W:0]   sh;
  logic [4:0]       sh_cnt;
  logic             rd_pending;
  logic [3:0]       rd_addr_q;

  assign tot_en      = csr[0];
  assign autosync_en = csr[1];
  assign max_pending = lv1cfg[3:0];
  assign burst_m1    = lv1cfg[7:4];
  assign fe_mask     = femask;
  assign cmd_len     = cmdlen;
  assign data_len    = datalen;
  assign fe_sel      = fesel[3:0];

  always_comb begin
    unique case (reg_addr_e'(rd_addr_q))
      R_CSR:     rd_value = {csr[REG_W-1:3], run, csr[1:0]};
      R_LV1CFG:  rd_value = lv1cfg;
      R_FEMASK:  rd_value = femask;
      R_CMDLEN:  rd_value = cmdlen;
      R_DATALEN: rd_value = datalen;
      R_WARN:    rd_value = warn_r;
      R_ERR:     rd_value = err_r;
      R_PENDING: rd_value = REG_W'(pending);
      R_LV1CNT:  rd_value = REG_W'(lv1_count);
      R_SUPPR:   rd_value = suppressed;
      R_FESEL:   rd_value = fesel;
      default:   rd_value = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr     <= '0;
      lv1cfg  <= 16'h000F;
      femask  <= '0;
      cmdlen  <= '0;
      datalen <= '0;
      fesel   <= '0;
      warn_r  <= '0;
      err_r   <= '0;
    end else begin
      if (we) begin
        unique case (reg_addr_e'(waddr))
          R_CSR:     csr     <= {wdata[REG_W-1:3], 1'b0, wdata[1:0]};
          R_LV1CFG:  lv1cfg  <= (wdata[3:0] == 4'd0) ? {wdata[REG_W-1:4], 4'd1} : wdata;
          R_FEMASK:  femask  <= wdata;
          R_CMDLEN:  cmdlen  <= wdata;
          R_DATALEN: datalen <= wdata;
          R_FESEL:   fesel   <= wdata;
          default: ;  // read-only or not implemented
        endcase
      end
      if (clear_status) begin
        warn_r <= '0;
        err_r  <= '0;
      end else begin
        warn_r <= warn_r | warn_set;
        err_r  <= err_r | err_set;
      end
    end
  end

  // REC/TRAN: serial read-back
  assign rd_busy = rd_pending || sh_cnt != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      rd_addr_q  <= '0;
      sh         <= '0;
      sh_cnt     <= '0;
      dout       <= 1'b0;
    end else begin
      dout <= 1'b0;
      if (rd_start && !rd_busy) begin
        rd_pending <= 1'b1;
        rd_addr_q  <= rd_addr;
      end else if (rd_pending && tx_allow) begin
        rd_pending <= 1'b0;
        sh         <= {1'b1, rd_value};
        sh_cnt     <= 5'(REG_W + 1);
      end
      if (sh_cnt != '0) begin
        dout   <= sh[REG_W];
        sh     <= {sh[REG_W-1:0], 1'b0};
        sh_cnt <= sh_cnt - 5'd1;
      end
    end
  end

endmodule
