// trace_mux: one trace multiplexer of the dynamic signal tracing datapath.
//
// Passes in[sel] to out. Each of the N trace-buffer bits has one of these;
// the trace controller drives its select code. Codes that name no input
// (NIN and above) give 0, a choice of this design. Purely combinational: the
// registered stage is the trace-buffer write that follows.
//
// A plain N:1 multiplexer as the source design calls for; the width
// parameterization is this design's. The default width, 73 inputs, is the reduced multiplexer for N = 32 trace
// bits and M = 4 regions: 1 + (M-1)(N - N/M).
module trace_mux #(
  parameter int unsigned NIN  = 73,
  parameter int unsigned SELW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [NIN-1:0]  in,
  input  logic [SELW-1:0] sel,
  output logic            out
);

  always_comb begin
    out = 1'b0;
    for (int unsigned j = 0; j < NIN; j++)
      if (sel == SELW'(j)) out = in[j];
  end

endmodule
