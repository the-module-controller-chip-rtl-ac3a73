// mcc_command_decoder: decodes the serial command stream from the ROD (DCI pin).
//
// The paper has the MCC decode a fast command, the level-1 trigger, and slow
// commands: SYNC, Data-Take (resume data taking), read/write of MCC registers and
// read/write of FE chip registers. A slow command takes the module out of data
// taking; Data-Take returns to it. Data for an FE chip is passed on at a reduced
// 5 MHz bit rate on DAO with the CCK clock, and LD tells the address+control part
// of the stream from the data part; the two lengths come from the register bank.
//
// The bit-level protocol is this design's own, since the paper gives none. DCI
// idles at 0 and is sampled every 40 MHz clock. A command starts with a 1:
//   11101                          level-1 trigger
//   10110 cccc [payload]           slow command, cccc = mcc_pkg::slow_cmd_e
//     SYNC, RUN                    no payload
//     WRREG  aaaa dddd..d (16)     register write
//     RDREG  aaaa                  register read, value returned on DTO
//     WRFE   CMDLEN+DATALEN bits   each bit held on DCI for 8 clocks
//     RDFE   CMDLEN bits           then DATALEN bits read back from the FE
// FE transfers run in slots of 8 clocks, starting the clock after the code field.
// In each slot DCI is sampled at phase 2 and put on DAO (with LD high for the
// first CMDLEN slots) from phase 3; CCK is high for phases 4..7, so the FE sees a
// rising CCK edge with DAO stable. CCK only runs during a transfer. For RDFE the
// FE chip selected in the register bank drives its data line; the bit it presents
// is sampled at each rising CCK edge and returned on cfg_dto in the following
// slot, after one slot holding a start bit 1, each bit for 8 clocks.
module mcc_command_decoder
  import mcc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dci,
  input  logic [REG_W-1:0] cmd_len,
  input  logic [REG_W-1:0] data_len,
  input  logic             fe_din,      // data line of the selected FE chip
  output logic             lv1_cmd,
  output logic             sync_cmd,
  output logic             run,
  output logic             reg_we,
  output logic [3:0]       reg_addr,
  output logic [REG_W-1:0] reg_wdata,
  output logic             reg_rd,
  output logic             dao,
  output logic             ld,
  output logic             cck,
  output logic             cfg_dto,
  output logic             fe_busy
);

  typedef enum logic [2:0] {D_IDLE, D_HDR, D_CODE, D_ADDR, D_DATA, D_FE} dstate_e;

  dstate_e          state;
  logic [4:0]       hdr;
  logic [4:0]       nbits;     // bits still to collect in this field
  logic [3:0]       code;
  logic [REG_W-1:0] shf;
  logic [2:0]       phase;
  logic [16:0]      slot;      // current slot of an FE transfer
  logic [16:0]      n_out;     // slots with a bit for the FE
  logic [16:0]      n_all;     // all slots of the transfer
  logic             fe_read;
  logic             rd_bit;

  assign fe_busy = state == D_FE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      hdr       <= '0;
      nbits     <= '0;
      code      <= '0;
      shf       <= '0;
      phase     <= '0;
      slot      <= '0;
      n_out     <= '0;
      n_all     <= '0;
      fe_read   <= 1'b0;
      rd_bit    <= 1'b0;
      lv1_cmd   <= 1'b0;
      sync_cmd  <= 1'b0;
      run       <= 1'b0;
      reg_we    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_rd    <= 1'b0;
      dao       <= 1'b0;
      ld        <= 1'b0;
      cck       <= 1'b0;
      cfg_dto   <= 1'b0;
    end else begin
      lv1_cmd  <= 1'b0;
      sync_cmd <= 1'b0;
      reg_we   <= 1'b0;
      reg_rd   <= 1'b0;
      unique case (state)
        D_IDLE:
          if (dci) begin
            hdr   <= 5'b00001;
            nbits <= 5'd4;
            state <= D_HDR;
          end
        D_HDR: begin
          hdr   <= {hdr[3:0], dci};
          nbits <= nbits - 5'd1;
          if (nbits == 5'd1) begin
            if ({hdr[3:0], dci} == CMD_LV1) begin
              lv1_cmd <= 1'b1;
              state   <= D_IDLE;
            end else if ({hdr[3:0], dci} == CMD_SLOW) begin
              nbits <= 5'd4;
              state <= D_CODE;
            end else begin
              state <= D_IDLE;   // unknown header: drop it
            end
          end
        end
        D_CODE: begin
          code  <= {code[2:0], dci};
          nbits <= nbits - 5'd1;
          if (nbits == 5'd1) begin
            state <= D_IDLE;
            unique case (slow_cmd_e'({code[2:0], dci}))
              SC_SYNC: sync_cmd <= 1'b1;
              SC_RUN:  run      <= 1'b1;
              SC_WRREG, SC_RDREG: begin
                run   <= 1'b0;
                nbits <= 5'd4;
                state <= D_ADDR;
              end
              SC_WRFE, SC_RDFE: begin
                run     <= 1'b0;
                fe_read <= {code[2:0], dci} == 4'(SC_RDFE);
                n_out   <= ({code[2:0], dci} == 4'(SC_RDFE)) ? 17'(cmd_len)
                                                             : 17'(cmd_len) + 17'(data_len);
                n_all   <= ({code[2:0], dci} == 4'(SC_RDFE)) ? 17'(cmd_len) + 17'(data_len) + 17'd1
                                                             : 17'(cmd_len) + 17'(data_len);
                slot    <= '0;
                phase   <= '0;
                if (cmd_len != '0 || data_len != '0) state <= D_FE;
              end
              default: ;   // unknown code: ignored
            endcase
          end
        end
        D_ADDR: begin
          reg_addr <= {reg_addr[2:0], dci};
          nbits    <= nbits - 5'd1;
          if (nbits == 5'd1) begin
            if (code == 4'(SC_RDREG)) begin
              reg_rd <= 1'b1;
              state  <= D_IDLE;
            end else begin
              nbits <= 5'(REG_W);
              state <= D_DATA;
            end
          end
        end
        D_DATA: begin
          shf   <= {shf[REG_W-2:0], dci};
          nbits <= nbits - 5'd1;
          if (nbits == 5'd1) begin
            reg_wdata <= {shf[REG_W-2:0], dci};
            reg_we    <= 1'b1;
            state     <= D_IDLE;
          end
        end
        D_FE: begin
          phase <= phase + 3'd1;
          if (phase == 3'd2) begin
            dao <= (slot < n_out) ? dci : 1'b0;
            ld  <= slot < 17'(cmd_len);
          end
          // CCK high in phases 4..7 of every slot that moves a bit
          if (phase == 3'd3) cck <= (slot < n_out) || (fe_read && slot < n_all - 17'd1);
          if (phase == 3'd7) cck <= 1'b0;
          // read-back: sample on the rising CCK edge, show in the next slot
          if (fe_read && phase == 3'd4 && slot >= n_out) rd_bit <= fe_din;
          if (fe_read && phase == 3'd7) begin
            if (slot + 17'd1 == n_out)      cfg_dto <= 1'b1;    // start bit
            else if (slot + 17'd1 > n_out && slot + 17'd1 < n_all) cfg_dto <= rd_bit;
            else                            cfg_dto <= 1'b0;
          end
          if (phase == 3'd7) begin
            slot <= slot + 17'd1;
            if (slot + 17'd1 == n_all) begin
              state   <= D_IDLE;
              dao     <= 1'b0;
              ld      <= 1'b0;
              cfg_dto <= 1'b0;
            end
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
