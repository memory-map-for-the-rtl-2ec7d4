// l3_buffer: the L3 memory used as the buffer of L3 event data.
//
// The memory holds 2^L3_AW 32-bit words (4 Mbytes at the default 20). The L3
// event builder writes its events into it as a circular buffer, one word per
// ev_we, ev_last marking the last word of an event; the word count of every
// finished event goes into a queue of 2^EVQ_DEPTH_LOG2 entries.
//
// The host reads the oldest finished event through the L3-DATA window
// (0x20000-0x27FFF): the read at byte offset 4*i returns word i of that event.
// Offsets at or past the event's word count return 0 and change nothing, so
// reading over the end is harmless. Reading the last word (i = count-1)
// retires the event; the next read of the window, or of the word-count
// register 0x28024 (wcount), then shows the next event. While no event is
// waiting, data_avail is low and wcount and window reads are 0. full is high
// when the memory or the count queue has no room; words that arrive then are
// dropped. Through a 64-kbyte debug window (0x10000-0x1FFFF) the host can read
// and write any word directly: byte address {l3_pa, addr[15:0]}, l3_pa being
// the L3-PA register.
// The windows, the page register and the retire-after-last-word rule are the
// memory map's. That the FIFO lives in the L3 memory, the count queue, the
// random access inside an event and the drop-when-full rule are this design's
// reading. Bus reads have one clock of latency.
module l3_buffer
  import stc_pkg::*;
#(
  parameter int L3_AW          = 20,
  parameter int EVQ_DEPTH_LOG2 = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    req_dbg,      // request decoded to the L3 memory page
  input  bus_req_t    req_fifo,     // request decoded to the L3-DATA window
  input  logic [5:0]  l3_pa,
  output logic [31:0] rdata,
  input  logic        ev_we,
  input  logic [31:0] ev_data,
  input  logic        ev_last,
  output logic        data_avail,
  output logic        full,
  output logic [31:0] wcount
);
  localparam int NW = 1 << L3_AW;
  localparam int NQ = 1 << EVQ_DEPTH_LOG2;

  logic [31:0] mem [NW];
  logic [15:0] cq  [NQ];

  logic [L3_AW-1:0]        wp, rb;          // write pointer, base of head event
  logic [EVQ_DEPTH_LOG2:0] cq_wp, cq_rp;
  logic [15:0]             in_cnt;
  logic [L3_AW-1:0]        used;
  logic                    cq_empty, cq_full, accept;
  logic [15:0]             head_cnt;

  assign used     = wp - rb;
  assign cq_empty = (cq_wp == cq_rp);
  assign cq_full  = ((cq_wp - cq_rp) == (EVQ_DEPTH_LOG2+1)'(NQ));
  assign full     = (used == L3_AW'(NW - 1)) || cq_full;
  assign accept   = ev_we && !full;
  assign head_cnt = cq[cq_rp[EVQ_DEPTH_LOG2-1:0]];
  assign data_avail = !cq_empty;
  assign wcount     = cq_empty ? 32'd0 : {16'd0, head_cnt};

  // Debug window address and L3-DATA word index.
  logic [21:0]      dbg_b;
  logic [L3_AW-1:0] dbg_idx;
  logic [12:0]      fi;
  logic             f_hit, f_last;
  assign dbg_b   = {l3_pa, req_dbg.addr[15:0]};
  assign dbg_idx = dbg_b[2 +: L3_AW];
  assign fi      = req_fifo.addr[14:2];
  assign f_hit   = req_fifo.rd && !cq_empty && ({3'd0, fi} < head_cnt);
  assign f_last  = f_hit && ({3'd0, fi} == head_cnt - 16'd1);

  always_ff @(posedge clk) begin
    if (accept) mem[wp] <= ev_data;
    if (req_dbg.wr) mem[dbg_idx] <= req_dbg.wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else if (req_dbg.rd) rdata <= mem[dbg_idx];
    else if (req_fifo.rd) rdata <= f_hit ? mem[rb + L3_AW'(fi)] : 32'd0;
  end

  always_ff @(posedge clk) begin
    if (accept && ev_last) cq[cq_wp[EVQ_DEPTH_LOG2-1:0]] <= in_cnt + 16'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rb <= '0; cq_wp <= '0; cq_rp <= '0; in_cnt <= '0;
    end else begin
      if (accept) begin
        wp <= wp + 1'b1;
        if (ev_last) begin
          in_cnt <= '0;
          cq_wp  <= cq_wp + 1'b1;
        end else begin
          in_cnt <= in_cnt + 16'd1;
        end
      end
      if (f_last) begin
        rb    <= rb + L3_AW'(head_cnt);
        cq_rp <= cq_rp + 1'b1;
      end
    end
  end
endmodule
