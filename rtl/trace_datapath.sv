// trace_datapath: the N trace multiplexers of the dynamic signal tracing unit.
//
// cand[i][p] is the p-th best trace signal of region i (p = 0 best), as chosen
// at design time. Because a region's signals are always taken best-first, its
// first N/M signals never have to compete with each other for a multiplexer:
// multiplexer k is "homed" on region h = k / (N/M) and gets that region's
// signal s = k mod (N/M) as input 0. The N - N/M remaining signals of every
// region are wired to all multiplexers not homed on that region. Each
// multiplexer therefore has 1 + (M-1)(N - N/M) inputs instead of M*N (73
// instead of 128 for N = 32, M = 4; 5 instead of 9 for N = M = 3).
//
// Input order of multiplexer k (this design's choice, shared with
// trace_controller): code 0 = cand[h][s]; then, for each other region i in
// increasing order (rank r = i for i < h, i-1 for i > h), code
// 1 + r*(N - N/M) + (p - N/M) = cand[i][p], p = N/M .. N-1.
//
// Combinational: trace[k] follows cand and sel in the same cycle.
//
// The homing of the first N/M signals and the sharing of the rest follow the
// source design of this unit; the input order and select encoding are this
// design's own. N must be a multiple of M.
module trace_datapath
  import dst_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter int unsigned N    = 32,
  parameter int unsigned SELW = sel_width(M, N)
) (
  input  logic [M-1:0][N-1:0]    cand,
  input  logic [N-1:0][SELW-1:0] sel,
  output logic [N-1:0]           trace
);

  localparam int unsigned H   = home_slots(M, N);
  localparam int unsigned REM = remain_slots(M, N);
  localparam int unsigned NIN = mux_inputs(M, N);

  if (N % M != 0) begin : g_bad_size
    $error("trace_datapath: N (%0d) must be a multiple of M (%0d)", N, M);
  end

  for (genvar k = 0; k < N; k++) begin : g_mux
    localparam int unsigned HOME = k / H;
    localparam int unsigned SLOT = k % H;
    logic [NIN-1:0] mux_in;

    always_comb begin
      mux_in    = '0;
      mux_in[0] = cand[HOME][SLOT];
      for (int unsigned i = 0; i < M; i++) begin
        if (i != HOME) begin
          for (int unsigned p = H; p < N; p++)
            mux_in[1 + ((i > HOME) ? i - 1 : i) * REM + (p - H)] = cand[i][p];
        end
      end
    end

    trace_mux #(.NIN(NIN), .SELW(SELW)) u_mux (
      .in  (mux_in),
      .sel (sel[k]),
      .out (trace[k])
    );
  end

endmodule
