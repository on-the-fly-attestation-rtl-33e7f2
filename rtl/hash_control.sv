// hash_control: control unit of the hash clock domain, with the register
// bank read port of the attestation module.
//
// Hashing: whenever the FIFO holds a full 512-bit block (16 words) and the
// SHA-256 core can take a new block, the controller starts the core and pops
// one FIFO word per cycle while the core asks for message words. Otherwise
// the core waits. Hashing never stops on its own: whatever follows the sync
// sequence is hashed, including anything appended after the end of a
// bitstream.
//
// Finishing: a pulse on read_hash says that no more data will come. After
// SETTLE cycles (so that the last words written in the ICAP domain reach the
// read side of the FIFO) and once no full block is waiting and the core is
// free, a remaining partial block is completed with zero words and hashed.
// Then ready goes high and stays high until reset. If the data was a whole
// number of blocks, the current digest is already final.
//
// Register bank: data shows the 32-bit word selected by address, without a
// clock: 0..7 are the digest words, most significant first; 8 is the
// validation status {abort_code[3:0], count[27:0]}; other addresses read 0.
// A read is marked by rd_strobe. Reading address 8 raises reset_icap, which
// resets the ICAP-domain units (filter, region delimiter, counter) for the
// next bitstream; it is held until eight digest words have been read. The
// hash side itself is cleared by the global reset.
//
// count and abort_code come from the ICAP domain; they are static by the time
// they are read (the bitstream has ended), and pass through two registers
// here only to keep them off the read path.
//
// Busy hash, Ready, readHash, Address, the 32-bit data bus, the zero
// completion of the last block and the reset order follow the design
// description. This design's own choices: the address map, the placement of
// the abort code in bits [31:28], the rd_strobe signal, SETTLE, and
// busy_hash meaning "a block is being compressed, or the final digest is
// being concluded after read_hash".
module hash_control
  import attest_pkg::*;
#(
  parameter int unsigned FIFO_AW = 7,
  parameter int unsigned SETTLE  = 8
) (
  input  logic              clk,
  input  logic              rst,
  // FIFO read side
  input  logic              fifo_block_avail,
  input  logic              fifo_empty,
  input  logic [FIFO_AW:0]  fifo_count,
  input  logic [31:0]       fifo_data,
  output logic              fifo_rd_en,
  // SHA-256 core
  input  logic              core_start_ok,
  input  logic              core_msg_req,
  input  logic              core_done,
  input  logic              core_busy,
  input  logic [255:0]      core_digest,
  output logic              core_start,
  output logic [31:0]       core_msg_word,
  // validation status from the ICAP domain
  input  logic [27:0]       count,
  input  abort_e            abort_code,
  // host side
  input  logic              read_hash,
  input  logic              rd_strobe,
  input  logic [3:0]        address,
  output logic [31:0]       data,
  output logic              ready,
  output logic              busy_hash,
  output logic              reset_icap
);

  typedef enum logic [1:0] {C_RUN, C_SETTLE, C_FINISH, C_READY} cstate_e;

  cstate_e            state;
  logic [4:0]         settle_cnt;
  logic               pad_block;    // the block in flight is the zero-completed one
  logic [FIFO_AW:0]   pad_left;     // real words still to take in that block
  logic [3:0]         dm_reads;
  logic [31:0]        status_s1, status_s2;

  // start a full block, or the final zero-completed one
  logic start_full, start_pad;

  assign start_full = (state != C_READY) && !pad_block &&
                      fifo_block_avail && core_start_ok;
  assign start_pad  = (state == C_FINISH) && !pad_block && !fifo_block_avail &&
                      !fifo_empty && core_start_ok;
  assign core_start = start_full || start_pad;

  always_comb begin
    fifo_rd_en    = 1'b0;
    core_msg_word = fifo_data;
    if (core_msg_req) begin
      if (!pad_block) begin
        fifo_rd_en = 1'b1;
      end else if (pad_left != '0) begin
        fifo_rd_en = 1'b1;
      end else begin
        core_msg_word = '0;
      end
    end
  end

  // hashing still in progress: a block is being compressed, or read_hash
  // has been seen and the final digest is not yet ready
  assign busy_hash = core_busy || state == C_SETTLE || state == C_FINISH;

  // the core is only fed from a FIFO that has a word
  a_pop_nonempty: assert property (@(posedge clk) disable iff (rst)
                                   fifo_rd_en |-> !fifo_empty);
  // a block is only started when the core can take it
  a_start_ok: assert property (@(posedge clk) disable iff (rst)
                               core_start |-> core_start_ok);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= C_RUN;
      settle_cnt <= '0;
      pad_block  <= 1'b0;
      pad_left   <= '0;
      ready      <= 1'b0;
      reset_icap <= 1'b0;
      dm_reads   <= '0;
      status_s1  <= '0;
      status_s2  <= '0;
    end else begin
      status_s1 <= {abort_code, count};
      status_s2 <= status_s1;

      if (pad_block && core_msg_req && pad_left != '0)
        pad_left <= pad_left - 1'b1;

      unique case (state)
        C_RUN: if (read_hash) begin
          state      <= C_SETTLE;
          settle_cnt <= 5'(SETTLE);
        end
        C_SETTLE: begin
          if (settle_cnt == '0) state <= C_FINISH;
          else                  settle_cnt <= settle_cnt - 1'b1;
        end
        C_FINISH: begin
          if (start_pad) begin
            pad_block <= 1'b1;
            pad_left  <= fifo_count;
          end else if (pad_block) begin
            if (core_done) begin
              pad_block <= 1'b0;
              state     <= C_READY;
              ready     <= 1'b1;
            end
          end else if (!fifo_block_avail && fifo_empty && core_start_ok &&
                       !core_busy) begin
            state <= C_READY;
            ready <= 1'b1;
          end
        end
        C_READY: ;
        default: state <= C_RUN;
      endcase

      // reset of the ICAP domain: from the status read until the digest is read
      if (rd_strobe) begin
        if (address == 4'd8) begin
          reset_icap <= 1'b1;
          dm_reads   <= '0;
        end else if (reset_icap && address < 4'd8) begin
          if (dm_reads == 4'd7)
            reset_icap <= 1'b0;
          dm_reads <= dm_reads + 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (address < 4'd8)
      data = core_digest[32*(7-int'(address[2:0])) +: 32];
    else if (address == 4'd8)
      data = status_s2;
    else
      data = '0;
  end

endmodule
