// trace_buffer: on-chip memory that records the traced signal states.
//
// A circular buffer of DEPTH words of W bits (32 x 1024 by default, the
// typical size the design is sized against). In every cycle with wr_en high
// the word din is written at wr_ptr and the pointer advances, wrapping from
// DEPTH-1 to 0; once it has wrapped, "wrapped" stays high and the buffer holds
// the most recent DEPTH words, the oldest at wr_ptr. The read port, used to
// offload the trace to the off-line debugger, is synchronous: rd_data shows
// the word at rd_addr one cycle after rd_addr is presented. A read of the
// address being written in the same cycle returns the old word.
//
// Reset (synchronous, active low) clears the pointer and the wrapped flag but
// not the array. The circular organization, the enable and the read port are
// this design's choices; the document specifies only the size and that the
// multiplexer outputs are stored every cycle.
module trace_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic [AW-1:0] wr_ptr,
  output logic          wrapped
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= din;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (wr_en) begin
      if (wr_ptr == AW'(DEPTH - 1)) begin
        wr_ptr  <= '0;
        wrapped <= 1'b1;
      end else begin
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

endmodule
