// ti_trigger_decode: decodes the trigger words read from the TI trigger FIFO.
//
// A word is read one clock after the slot tick (phase 1). Trigger words are
// held for one slot and then re-issued as a one-clock trig_out pulse in the
// clock of the next slot given by their quadrant timing, so triggers leave the
// TI with 4 ns precision although words come every 16 ns:
//   GTP / external / VME trigger words (std_en):  quadrant and event type
//   partition words (part_en): the 3-bit type of partition part_sel
//                              (0..3 = partitions 1..4); no timing, quadrant 0
// Other words: a trigger content word with bit 0 set gives sync_mark (the
// trigger before it was a SyncEvent); a VME command word gives cmd_valid; a
// TS timer word is compared with the TI's own clock counter: the offset seen
// in the first timer word after trigger start must hold for every later one,
// else the sticky sync_err is set.
// trig_out is registered. Latency from tick: 5 + quadrant clocks.
// Word meanings follow the document's trigger word definition; holding for
// one slot, the offset-based timer check and the SyncEvent marking through
// the content word are this design's choices.
module ti_trigger_decode
  import tcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  phase,
  input  logic        rd_valid,
  input  logic [15:0] rd_word,
  input  logic        fe_reset,
  input  logic        trig_start,
  input  logic        std_en,
  input  logic        part_en,
  input  logic [1:0]  part_sel,
  output logic        trig_out,
  output logic [9:0]  trig_etype,
  output logic [3:0]  trig_src,
  output logic        sync_mark,
  output logic        cmd_valid,
  output logic [11:0] cmd,
  output logic        sync_err,
  output logic [15:0] checks
);
  typedef struct packed {
    logic       valid;
    logic [1:0] quad;
    logic [9:0] etype;
    logic [3:0] src;
  } pend_t;

  pend_t       dec, pend, arm;
  logic [13:0] ltime;
  logic [11:0] offset;
  logic        have_off;
  tw_hdr_e     hdr;
  logic [2:0]  ptyp;

  always_comb begin
    hdr  = tw_hdr_e'(rd_word[15:12]);
    ptyp = rd_word[3*part_sel +: 3];
    dec  = '0;
    if (rd_valid) begin
      unique case (hdr)
        TW_GTP, TW_EXT, TW_VME_TRIG:
          if (std_en) dec = '{valid: 1'b1, quad: rd_word[11:10], etype: rd_word[9:0], src: rd_word[15:12]};
        TW_PART:
          if (part_en && ptyp != '0) dec = '{valid: 1'b1, quad: 2'd0, etype: 10'(ptyp), src: rd_word[15:12]};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst || fe_reset) begin
      pend <= '0; arm <= '0;
      trig_out <= 1'b0; trig_etype <= '0; trig_src <= '0;
      sync_mark <= 1'b0; cmd_valid <= 1'b0; cmd <= '0;
      ltime <= '0; offset <= '0; have_off <= 1'b0;
      sync_err <= 1'b0; checks <= '0;
    end else begin
      ltime     <= ltime + 1'b1;
      trig_out  <= 1'b0;
      sync_mark <= 1'b0;
      cmd_valid <= 1'b0;

      if (phase == 2'd3) begin
        arm  <= pend;
        pend <= '0;
      end
      if (dec.valid) pend <= dec;

      if (arm.valid && phase == arm.quad) begin
        trig_out   <= 1'b1;
        trig_etype <= arm.etype;
        trig_src   <= arm.src;
      end

      if (trig_start) have_off <= 1'b0;

      if (rd_valid) begin
        if (hdr == TW_CONTENT && rd_word[0]) sync_mark <= 1'b1;
        if (hdr == TW_VME_CMD) begin
          cmd_valid <= 1'b1;
          cmd       <= rd_word[11:0];
        end
        if (hdr == TW_SYNC_CHK) begin
          if (!have_off) begin
            offset   <= rd_word[11:0] - ltime[13:2];
            have_off <= 1'b1;
          end else begin
            checks <= checks + 1'b1;
            if (rd_word[11:0] != ltime[13:2] + offset) sync_err <= 1'b1;
          end
        end
      end
    end
  end
endmodule
