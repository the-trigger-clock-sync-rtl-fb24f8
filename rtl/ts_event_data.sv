// ts_event_data: the TS's own event data, one record per readout trigger.
//
// The main stream gets a record for every accepted main trigger (GTP,
// external or VME, including inserted SyncEvents):
//   {trigger number[31:0], time stamp[47:0], word header[3:0], SyncEvent,
//    event type[9:0]}                                        (95 bits)
// Each of the NP sub-TS has its own stream with one record per accepted
// trigger of that partition:
//   {partition trigger number[31:0], time stamp[47:0], type[2:0]} (83 bits)
// Trigger numbers start at 1 and, like the buffers, are cleared by clr (the
// TS sends a front end reset). The time stamp is the TS timer of the clock
// in which the trigger was accepted.
// Each stream is a first-word-fall-through FIFO: data shows the oldest
// record while avail is high, and rd pops it. A record arriving at a FIFO
// that is full before this clock's read is dropped and sets the sticky ovf
// flag (cleared by clr).
// Records are written in the clock after acc.valid / part_acc, so avail
// rises 1 clock after the trigger is accepted.
// That the TS keeps event data per readout trigger and per sub-TS, for
// readout by the controller, follows the document; the record contents
// (mirroring the TI's event data), depths and the overflow rule are this
// design's choices.
module ts_event_data
  import tcs_pkg::*;
#(
  parameter int unsigned NP     = N_PART,
  parameter int unsigned DEPTH  = 256,   // main stream records
  parameter int unsigned PDEPTH = 64     // records per sub-TS stream
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clr,
  input  logic [47:0]          ts_time,
  input  trig_t                acc,
  input  logic [NP-1:0][2:0]   part_acc,
  // main stream
  input  logic                 rd,
  output logic                 avail,
  output logic [94:0]          data,
  output logic                 ovf,
  // sub-TS streams
  input  logic [NP-1:0]        prd,
  output logic [NP-1:0]        pavail,
  output logic [NP-1:0][82:0]  pdata,
  output logic [NP-1:0]        povf
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned PAW = $clog2(PDEPTH);

  // ---------------- main stream ----------------
  logic [94:0]  mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic [31:0]  num;

  assign avail = (wp != rp);
  assign data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wp  <= '0;
      rp  <= '0;
      num <= '0;
      ovf <= 1'b0;
    end else begin
      if (rd && avail) rp <= rp + 1'b1;
      if (acc.valid) begin
        num <= num + 1'b1;
        if ((wp - rp) != (AW+1)'(DEPTH)) wp <= wp + 1'b1;
        else                              ovf <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (acc.valid && (wp - rp) != (AW+1)'(DEPTH))
      mem[wp[AW-1:0]] <= {num + 1'b1, ts_time, 4'(acc.hdr), acc.sync_ev, acc.etype};

  // ---------------- sub-TS streams ----------------
  for (genvar p = 0; p < NP; p++) begin : g_part
    logic [82:0]  pmem [PDEPTH];
    logic [PAW:0] pwp, prp;
    logic [31:0]  pnum;
    logic         hit;

    assign hit       = (part_acc[p] != 3'd0);
    assign pavail[p] = (pwp != prp);
    assign pdata[p]  = pmem[prp[PAW-1:0]];

    always_ff @(posedge clk) begin
      if (rst || clr) begin
        pwp     <= '0;
        prp     <= '0;
        pnum    <= '0;
        povf[p] <= 1'b0;
      end else begin
        if (prd[p] && pavail[p]) prp <= prp + 1'b1;
        if (hit) begin
          pnum <= pnum + 1'b1;
          if ((pwp - prp) != (PAW+1)'(PDEPTH)) pwp <= pwp + 1'b1;
          else                                  povf[p] <= 1'b1;
        end
      end
    end

    always_ff @(posedge clk)
      if (hit && (pwp - prp) != (PAW+1)'(PDEPTH))
        pmem[pwp[PAW-1:0]] <= {pnum + 1'b1, ts_time, part_acc[p]};
  end
endmodule
