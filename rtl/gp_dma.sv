// gp_dma: direct-memory-access reader that streams graphics command words.
//
// A start pulse loads a byte address; from then on the engine requests
// consecutive 32-bit words (address +4 each) from the data-memory arbiter and
// queues the returned words in a small FIFO, from which the command parser
// pops them. Requests are only made while the FIFO plus the reads still in
// flight would fit in DEPTH entries, so returned data is never refused.
// stop (end of a command list) and start (a new list) both flush the FIFO;
// reads that were already granted still return and are counted off and
// discarded, so no stale word reaches the parser.
//
// Memory side: mem_req/mem_addr are held until mem_gnt is seen in the same
// cycle; the data arrives later with mem_rvalid (any fixed or variable
// latency, in order). The arbiter grants only cycles the processor does not
// use, which is how this engine takes only free data-memory cycles.
// Parser side: word_valid/word_data show the FIFO head; word_pop removes it.
//
// From the specification: reading commands from data memory by DMA,
// starting at the GP_CODE address, on free cycles only. Own choices: the
// prefetch FIFO, its depth, the request/grant handshake and the flush rule.
module gp_dma
  import gp_pkg::*;
#(
  parameter int unsigned DEPTH = 4,        // prefetch FIFO entries
  parameter int unsigned AW    = WORD_W,   // byte address width
  parameter int unsigned DW    = WORD_W    // word width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW-1:0] start_addr,
  input  logic          stop,
  // data-memory arbiter
  output logic          mem_req,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  logic [DW-1:0] mem_rdata,
  // command parser
  output logic          word_valid,
  output logic [DW-1:0] word_data,
  input  logic          word_pop
);

  localparam int unsigned PTRW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNTW = $clog2(DEPTH + 1) + 1;

  logic            active;
  logic [AW-1:0]   next_addr;
  logic [CNTW-1:0] inflight;   // granted reads not yet returned
  logic [CNTW-1:0] drop;       // of those, how many belong to a flushed stream
  logic [CNTW-1:0] count;      // FIFO occupancy
  logic [PTRW-1:0] rd_ptr, wr_ptr;
  logic [DW-1:0]   fifo [DEPTH];

  logic flush, push, pop, fire;

  assign flush      = start || stop;
  assign mem_addr   = next_addr;
  assign mem_req    = active && !flush &&
                      ((count + (inflight - drop)) < CNTW'(DEPTH));
  assign fire       = mem_req && mem_gnt;
  assign word_valid = (count != '0);
  assign word_data  = fifo[rd_ptr];
  assign pop        = word_pop && word_valid && !flush;
  assign push       = mem_rvalid && !flush && (drop == '0);

  function automatic logic [PTRW-1:0] ptr_inc(input logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      active    <= 1'b0;
      next_addr <= '0;
      inflight  <= '0;
      drop      <= '0;
      count     <= '0;
      rd_ptr    <= '0;
      wr_ptr    <= '0;
    end else begin
      inflight <= inflight + CNTW'(fire) - CNTW'(mem_rvalid);
      if (flush) begin
        active    <= start;
        next_addr <= start_addr;
        drop      <= inflight + CNTW'(fire) - CNTW'(mem_rvalid);
        count     <= '0;
        rd_ptr    <= '0;
        wr_ptr    <= '0;
      end else begin
        if (fire) next_addr <= next_addr + AW'(4);
        if (mem_rvalid && drop != '0) drop <= drop - 1'b1;
        if (push) begin
          fifo[wr_ptr] <= mem_rdata;
          wr_ptr       <= ptr_inc(wr_ptr);
        end
        if (pop) rd_ptr <= ptr_inc(rd_ptr);
        count <= count + CNTW'(push) - CNTW'(pop);
      end
    end
  end

  // Returned data always has room in the FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
                                  push |-> (count < CNTW'(DEPTH)) || pop);

endmodule
