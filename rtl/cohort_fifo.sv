// cohort_fifo: one queue endpoint between the software thread and a
// sub-accelerator. The software side of the system talks to every
// sub-accelerator through a pair of such FIFO queues: a consumer queue
// (software to accelerator) and a producer queue (accelerator to software).
//
// How it works: a circular buffer of DEPTH words with read and write
// pointers and an occupancy counter. Both sides use valid/ready handshakes;
// a word is transferred on a rising clock edge where valid and ready are both
// high. A word written in cycle t can be read in cycle t+1 (no fall-through).
// in_ready is simply "not full": a full queue takes no write, even in a
// cycle where it is read.
//
// In the system this design follows, the queues live in cache-coherent memory
// and are managed by the Cohort engine; here each queue is a plain on-chip FIFO
// (a design choice: the memory-backed queue machinery is not modelled).
// Depth and width are this design's choices.
module cohort_fifo #(
  parameter int unsigned W     = 32,  // word width
  parameter int unsigned DEPTH = 4    // number of words held
) (
  input  logic         clk,
  input  logic         rst_n,  // synchronous, active low
  // write side
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  // read side
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;

  logic do_wr, do_rd;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  // Handshake rules: a pending word must stay put until it is taken.
  property p_hold_valid;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> out_valid;
  endproperty
  a_hold_valid: assert property (p_hold_valid);
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
