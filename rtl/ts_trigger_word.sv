// ts_trigger_word: forms the 16-bit trigger word sent on the trigger link
// once per 16 ns slot (62.5 MHz).
//
// During a slot (phase 0..3) it collects the accepted main trigger, whose
// quadrant timing is the phase it was accepted in, and the sub-TS types.
// At the last clock of the slot it chooses the word for the next slot:
//   1. a main trigger:   hdr | quadrant[11:10] | event type[9:0]
//   2. trigger content:  TW_CONTENT | 12'h001 after a SyncEvent trigger
//   3. partition word:   TW_PART | types of partitions 4,3,2,1 (3 bits each)
//   4. VME command:      TW_VME_CMD | cmd[11:0]
//   5. otherwise the TS timer word TW_SYNC_CHK | ts_time[13:2]
// so that an enabled link carries a valid word in every slot. A partition
// word that meets a main trigger is held (part_hold) and sent in the next
// free slot. With the link disabled only idle words (valid=0) are sent and
// pending words are dropped.
// Timing: link.valid is high for the first clock of each slot; a trigger
// accepted in phase p appears 4-p clocks later.
// The word layout follows the document's trigger word definition; the
// priorities, the content word value and the hold rule are this design's.
module ts_trigger_word
  import tcs_pkg::*;
#(
  parameter int unsigned NP = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [1:0]             phase,
  input  logic                   link_en,
  input  trig_t                  acc,
  input  logic [NP-1:0][2:0] part_acc,
  input  logic                   cmd_valid,
  input  logic [11:0]            cmd,
  input  logic [13:0]            ts_time,
  output logic                   part_hold,
  output tlink_t                 link
);
  trig_t      main_q;
  logic [1:0] quad_q;
  logic [NP-1:0][2:0] part_q;
  logic       content_pend, cmd_pend;
  logic [11:0] cmd_q;

  // this clock merged with what the slot already holds
  trig_t      main_n;
  logic [1:0] quad_n;
  logic [NP-1:0][2:0] part_n;

  always_comb begin
    main_n = main_q;
    quad_n = quad_q;
    if (acc.valid && !main_q.valid) begin
      main_n = acc;
      quad_n = phase;
    end
    part_n = part_q;
    for (int p = 0; p < NP; p++)
      if (part_q[p] == '0) part_n[p] = part_acc[p];
  end

  logic held;
  assign part_hold = held;

  always_ff @(posedge clk) begin
    if (rst) begin
      main_q       <= '0;
      quad_q       <= '0;
      part_q       <= '0;
      content_pend <= 1'b0;
      cmd_pend     <= 1'b0;
      cmd_q        <= '0;
      held         <= 1'b0;
      link         <= '0;
    end else begin
      link.valid <= 1'b0;
      main_q     <= main_n;
      quad_q     <= quad_n;
      part_q     <= part_n;
      if (cmd_valid) begin    // a newer command replaces an unsent one
        cmd_pend <= 1'b1;
        cmd_q    <= cmd;
      end
      if (phase == 2'd3) begin
        main_q <= '0;
        if (!link_en) begin
          part_q       <= '0;
          held         <= 1'b0;
          content_pend <= 1'b0;
          cmd_pend     <= 1'b0;
        end else begin
          link.valid <= 1'b1;
          if (main_n.valid) begin
            link.word    <= {main_n.hdr, quad_n, main_n.etype};
            content_pend <= main_n.sync_ev;
            held         <= (part_n != '0);
          end else if (content_pend) begin
            link.word    <= {TW_CONTENT, 12'h001};
            content_pend <= 1'b0;
          end else if (part_n != '0) begin
            link.word    <= {TW_PART, 12'(part_n)};
            part_q       <= '0;
            held         <= 1'b0;
          end else if (cmd_pend || cmd_valid) begin
            link.word    <= {TW_VME_CMD, cmd_valid ? cmd : cmd_q};
            cmd_pend     <= 1'b0;
          end else begin
            link.word    <= {TW_SYNC_CHK, ts_time[13:2]};
          end
        end
      end
    end
  end
endmodule
