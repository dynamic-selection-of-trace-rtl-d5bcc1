// dst_top: dynamic signal tracing (DST) unit for post-silicon debug.
//
// At design time every functional region R_i of the circuit under debug gets
// a list of its N best trace signals for detecting errors in that region's
// error zone; the M lists are wired to cand (cand[i][p] = p-th best signal of
// region i). At run time a validation engineer sets the active_regions knob to
// the regions that are currently relevant; the trace controller then shares
// the N trace-buffer bits among the active regions in proportion to their
// relevance weights, and the N multiplexers of the datapath route the chosen
// signals into the trace buffer, one N-bit word per clock.
//
//   active_regions -> trace_controller -> sel -> trace_datapath -> trace_buffer
//   cand ---------------------------------------^
//
// Timing: the knob is registered at a clock edge; from that edge on the
// multiplexers carry the signals it chooses (trace_word, combinational from
// cand), and the word is written to the buffer at the next edge if trace_en is
// high. alloc gives the number of trace bits each region holds in the current
// state. The buffer is read through rd_addr/rd_data with one cycle latency.
// trace_en, the read port and the status outputs are this design's additions.
module dst_top
  import dst_pkg::*;
#(
  parameter int unsigned       M         = 4,
  parameter int unsigned       N         = 32,
  parameter int unsigned       DEPTH     = 1024,
  parameter logic [M-1:0][7:0] RELEVANCE = {M{8'd1}},
  parameter int unsigned       AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [M-1:0]         active_regions,
  input  logic [M-1:0][N-1:0]  cand,
  input  logic                 trace_en,
  output logic [N-1:0]         trace_word,
  output logic [M-1:0]         state,
  output logic [M-1:0][$clog2(N+1)-1:0] alloc,
  input  logic [AW-1:0]        rd_addr,
  output logic [N-1:0]         rd_data,
  output logic [AW-1:0]        wr_ptr,
  output logic                 wrapped
);

  localparam int unsigned SELW = sel_width(M, N);
  localparam int unsigned CW   = $clog2(N + 1);

  logic [N-1:0][SELW-1:0] sel;

  trace_controller #(.M(M), .N(N), .RELEVANCE(RELEVANCE), .SELW(SELW), .CW(CW)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .active_regions (active_regions),
    .state          (state),
    .sel            (sel),
    .alloc          (alloc)
  );

  trace_datapath #(.M(M), .N(N), .SELW(SELW)) u_dp (
    .cand  (cand),
    .sel   (sel),
    .trace (trace_word)
  );

  trace_buffer #(.W(N), .DEPTH(DEPTH), .AW(AW)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (trace_en),
    .din     (trace_word),
    .rd_addr (rd_addr),
    .rd_data (rd_data),
    .wr_ptr  (wr_ptr),
    .wrapped (wrapped)
  );

endmodule
