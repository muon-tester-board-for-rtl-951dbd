// Synchronous FIFO with first-word-fall-through output.
//
// Used for the four buffers of the tester: FIFO_A and FIFO_B (32 bits wide,
// pattern data for the MPC and MS) and FIFO_C and FIFO_D (1 and 2 bits wide,
// winner bits returned by the MPC and MS). The specification gives the widths
// and the depth of 511 words and requires the empty flag to be set after power
// up and after the reset command; the storage scheme is this design's own.
//
// Storage is a DEPTH-entry array addressed by read and write pointers that
// wrap at DEPTH, plus an occupancy counter that gives the flags. rd_data shows
// the oldest word whenever empty is low, so a pop takes the word on the same
// clock edge. A push while full and a pop while empty are ignored. A push and a
// pop in the same cycle are both performed. clr empties the FIFO
// synchronously; rst_n does the same asynchronously.
module mt_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 511
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // The occupancy count must agree with the pointer distance at all times
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (count == DEPTH[$clog2(DEPTH+1)-1:0] ||
              AW'(count) == ((wr_ptr >= rd_ptr) ? AW'(wr_ptr - rd_ptr)
                                                : AW'(AW'(DEPTH) - rd_ptr + wr_ptr)))
        else $error("mt_fifo: count and pointers disagree");
    end
  end
endmodule
