// tcs_pkg: types and constants shared by the trigger/clock/SYNC (TCS)
// distribution blocks.
//
// All logic runs on the single 250 MHz system clock that the whole system
// shares. The 62.5 MHz trigger-word clock is represented by a 2-bit phase
// counter: a "slot" is four system clocks (16 ns) and one 16-bit trigger word
// is carried per slot. The trigger word headers (Table-1 style bits 15:12) and
// the SYNC command codes are those of the distribution protocol; the status
// bundle a TI returns and the fibre delay rule are this design's own choices.
package tcs_pkg;


  // Trigger word header, bits 15:12
  typedef enum logic [3:0] {
    TW_GTP      = 4'b1001,  // GTP major trigger: quadrant[11:10], event type[9:0]
    TW_EXT      = 4'b1010,  // external major trigger: quadrant, event type
    TW_PART     = 4'b1011,  // partition word: four 3-bit sub-TS event types
    TW_VME_TRIG = 4'b0110,  // VME (test) trigger: quadrant, source/event type
    TW_VME_CMD  = 4'b0101,  // trigger command / control
    TW_SYNC_CHK = 4'b0100,  // TS timer bits 13:2, TI sync check
    TW_CONTENT  = 4'b0111   // additional trigger information
  } tw_hdr_e;

  // SYNC command codes (4-bit code following the start bit)
  typedef enum logic [3:0] {
    SC_FULL_RESET   = 4'b0001, // TI VME clock DCM reset then full reset
    SC_SYSCLK_RESYNC= 4'b0010, // system clock resync, slow clock resync, DCM/MGT reset
    SC_CLK_RESYNC   = 4'b0011, // slower clock phase re-sync
    SC_GTP_STAT_RST = 4'b0100, // reset TI GTP status register
    SC_TRIG_START   = 4'b0101, // trigger start, FIFO read counter reset
    SC_TRIG_STOP    = 4'b0111, // trigger stop, FIFO write counter reset
    SC_FE_RESET     = 4'b1101  // front end crate reset, trigger link realignment
  } sync_cmd_e;

  // One trigger-link transfer: valid for one cycle at the start of a slot.
  // valid=0 is an idle word, which a receiver never stores.
  typedef struct packed {
    logic        valid;
    logic [15:0] word;
  } tlink_t;

  // Status returned from a TI to its TD (one bundle every clock; the ack
  // fields are single-cycle pulses).
  typedef struct packed {
    logic busy;            // crate BUSY (front end BUSY merged with TI BUSY)
    logic blk_end;         // a block of triggers was closed in the TI
    logic roc_ack;         // ROC acknowledged the readout of one block
    logic sync_reset_req;  // ROC requests a SyncReset
  } ti_status_t;

  // Status merged upward through TD and SD to the TS (fields OR-merged)
  typedef struct packed {
    logic busy;
    logic sync_reset_req;
  } feedback_t;

  // TS decision for one accepted trigger
  typedef struct packed {
    logic       valid;
    tw_hdr_e    hdr;      // TW_GTP, TW_EXT or TW_VME_TRIG
    logic [9:0] etype;
    logic       sync_ev;  // this trigger is a SyncEvent
  } trig_t;

  localparam int unsigned N_GTP  = 30;   // GTP inputs (VME P2)
  localparam int unsigned N_EXT  = 30;   // front-panel synchronous inputs
  localparam int unsigned N_ASY  = 15;   // front-panel asynchronous inputs
  localparam int unsigned N_TRIG = N_GTP + N_EXT + N_ASY;
  localparam int unsigned N_PART = 4;    // sub-TS partitions

  // Static TS configuration (VME registers)
  typedef struct packed {
    logic [N_TRIG-1:0]             in_enable;
    logic [N_TRIG-1:0][15:0]       in_prescale;
    logic [N_PART-1:0][4:0][4:0]   part_sel_gtp;   // 5 of 30 GTP inputs
    logic [N_PART-1:0][4:0][4:0]   part_sel_ext;   // 5 of 30 external inputs
    logic [N_PART-1:0][2:0][3:0]   part_sel_asy;   // 3 of 15 asynchronous inputs
    logic [15:0]                   start_delay;    // slots from link start to SYNC trigger start
    logic [7:0]                    min_gap;        // trigger rule, clocks between triggers
    logic [15:0]                   sync_period;    // periodic SyncEvent, 0 = off
    logic [1:0]                    sync_align;     // slot phase of the first SYNC code bit
  } ts_cfg_t;

  // Lookup table load port of the TS. tbl selects the table:
  //   0..2  GTP first level, 3 GTP second level,
  //   4..8  external first level, 9 external second level,
  //   10..13 sub-TS tables of partitions 1..4
  typedef struct packed {
    logic        en;
    logic [3:0]  tbl;
    logic [14:0] addr;
    logic [10:0] data;
  } lut_wr_t;

  // Per-TI configuration (VME registers)
  typedef struct packed {
    logic [8:0] sync_target;  // fibre + TI SYNC delay target, clocks
    logic       std_en;       // decode standard TS trigger words
    logic       part_en;      // decode partition words
    logic [1:0] part_sel;     // partition decoded (0..3 = 1..4)
    logic [7:0] block_size;   // triggers per readout block
  } ti_cfg_t;

  // Fibre propagation of test setup lengths (150 m, 50 m, 5 m, 4 m) at
  // about 5 ns per metre, rounded up to 4 ns clock periods.
  function automatic int unsigned fibre_cycles(int unsigned idx);
    case (idx % 4)
      0: return 188;   // 150 m
      1: return 63;    // 50 m
      2: return 7;     // 5 m
      default: return 5; // 4 m
    endcase
  endfunction

endpackage
