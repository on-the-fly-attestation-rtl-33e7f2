// region_delimiter: configuration packet parser that confines a partial
// reconfiguration to a fixed region of the device.
//
// The parser follows the 32-bit packet stream after the sync sequence. A
// type 1 header names a configuration register and a word count; a type 2
// header carries a longer word count for the register named by the last
// type 1 header. The payload words of a write are then routed by register:
//   FAR   loads the parser's own frame address register;
//   FLR   must equal the frame length of the device in use;
//   CMD   must not be SWITCH, SHUTDOWN or MFWR;
//   FDRI  is frame data: at the first word of every frame the current frame
//         address must lie in [REGION_FIRST, REGION_LAST]; after FRAME_WORDS
//         words the frame address advances by one;
//   MFWR  may not be written at all.
// A word that is not a type 1 or type 2 header where one is expected also
// aborts, since the parser could no longer follow the stream. The first
// violation raises abort and latches its 4-bit code; both hold, and parsing
// stops, until reset.
//
// Interface: one word per new_packet pulse. abort and abort_code are
// registered and change in the cycle after the offending word, which is well
// inside the one-word delay of the ICAP before it acts on a word. Synchronous
// reset.
//
// Which registers and commands are checked, the fixed region and the FLR
// comparison follow the design description. The packet and frame address
// layout is the Virtex-II Pro one. This design's own choices: the frame
// address is the FAR field [26:9] (block type, major and minor address)
// treated as one linear frame number, so the region is a range of that
// number and frames advance by +1; FLR must hold the frame length in words;
// abort codes are numbered as in attest_pkg.
module region_delimiter
  import attest_pkg::*;
#(
  parameter int unsigned FRAME_WORDS  = 206,    // 32-bit words per frame
  parameter logic [31:0] FLR_VALUE    = 32'(FRAME_WORDS),
  parameter int unsigned FA_LSB       = 9,      // frame number field of FAR
  parameter int unsigned FA_W         = 18,
  parameter logic [FA_W-1:0] REGION_FIRST = 18'h0_4000,
  parameter logic [FA_W-1:0] REGION_LAST  = 18'h0_4FFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] word,
  input  logic        new_packet,
  output logic        abort,
  output abort_e      abort_code
);

  typedef enum logic {S_HEADER, S_DATA} state_e;

  state_e            state;
  cfg_reg_e          cur_reg;     // register the payload words go to
  cfg_reg_e          last_reg;    // register of the last type 1 header
  logic [26:0]       remaining;   // payload words still to come
  logic [FA_W-1:0]   frame_addr;  // internal copy of the frame address
  logic [15:0]       frame_word;  // word index inside the current frame

  logic [2:0]  hdr_type;
  logic [1:0]  hdr_op;
  logic [4:0]  hdr_reg;
  logic        hdr_reg_known;
  logic [10:0] hdr_wc1;
  logic [26:0] hdr_wc2;

  assign hdr_type      = word[31:29];
  assign hdr_op        = word[28:27];
  assign hdr_reg       = word[17:13];
  assign hdr_reg_known = (word[26:18] == '0);
  assign hdr_wc1       = word[10:0];
  assign hdr_wc2       = word[26:0];

  // violation caused by the current word, ABT_NONE if it is legal
  abort_e viol;

  always_comb begin
    viol = ABT_NONE;
    if (state == S_HEADER) begin
      if (hdr_type == PKT_TYPE1) begin
        if (hdr_op == OP_WRITE && hdr_reg_known && hdr_reg == REG_MFWR)
          viol = ABT_MFWR_REG;
      end else if (hdr_type == PKT_TYPE2) begin
        if (hdr_op == OP_WRITE && last_reg == REG_MFWR)
          viol = ABT_MFWR_REG;
      end else begin
        viol = ABT_BAD_PACKET;
      end
    end else begin
      unique case (cur_reg)
        REG_FLR:  if (word != FLR_VALUE) viol = ABT_BAD_FLR;
        REG_CMD: begin
          if (word[3:0] == CMD_SWITCH)        viol = ABT_CMD_SWITCH;
          else if (word[3:0] == CMD_SHUTDOWN) viol = ABT_CMD_SHUTDOWN;
          else if (word[3:0] == CMD_MFWR)     viol = ABT_CMD_MFWR;
        end
        REG_FDRI: if (frame_word == '0 &&
                      (frame_addr < REGION_FIRST || frame_addr > REGION_LAST))
                    viol = ABT_FRAME_REGION;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_HEADER;
      cur_reg    <= REG_CRC;
      last_reg   <= REG_CRC;
      remaining  <= '0;
      frame_addr <= '0;
      frame_word <= '0;
      abort      <= 1'b0;
      abort_code <= ABT_NONE;
    end else if (new_packet && !abort) begin
      if (viol != ABT_NONE) begin
        abort      <= 1'b1;
        abort_code <= viol;
      end else if (state == S_HEADER) begin
        if (hdr_type == PKT_TYPE1) begin
          // registers outside the table map to CRC, which has no checks
          last_reg <= hdr_reg_known ? cfg_reg_e'(hdr_reg) : REG_CRC;
          cur_reg  <= hdr_reg_known ? cfg_reg_e'(hdr_reg) : REG_CRC;
          if (hdr_op == OP_WRITE && hdr_wc1 != '0) begin
            remaining <= 27'(hdr_wc1);
            state     <= S_DATA;
          end
        end else begin
          cur_reg <= last_reg;
          if (hdr_op == OP_WRITE && hdr_wc2 != '0) begin
            remaining <= hdr_wc2;
            state     <= S_DATA;
          end
        end
      end else begin
        case (cur_reg)
          REG_FAR: begin
            frame_addr <= word[FA_LSB +: FA_W];
            frame_word <= '0;
          end
          REG_FDRI: begin
            if (frame_word == 16'(FRAME_WORDS - 1)) begin
              frame_word <= '0;
              frame_addr <= frame_addr + 1'b1;
            end else begin
              frame_word <= frame_word + 1'b1;
            end
          end
          default: ;
        endcase
        remaining <= remaining - 1'b1;
        if (remaining == 27'd1)
          state <= S_HEADER;
      end
    end
  end

endmodule
