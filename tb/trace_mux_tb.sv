// trace_mux_tb: self-checking test of one trace multiplexer.
//
// Uses the default 73-input multiplexer (N = 32 trace bits, M = 4 regions).
// For every select code, including the unused codes 73..127, it drives random
// inputs and then a one-hot and a one-cold pattern on the selected input, and
// compares the output with in[sel] (or 0 for unused codes).
module trace_mux_tb;
  localparam int unsigned NIN  = 73;
  localparam int unsigned SELW = 7;

  logic [NIN-1:0]  in;
  logic [SELW-1:0] sel;
  logic            out;
  int checks = 0, failures = 0;

  trace_mux #(.NIN(NIN)) dut (.in(in), .sel(sel), .out(out));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s sel=%0d out=%b exp=%b", what, sel, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2 ** SELW; s++) begin
      sel = SELW'(s);
      for (int r = 0; r < 4; r++) begin
        in = NIN'({$urandom, $urandom, $urandom});
        check((s < NIN) ? in[s] : 1'b0, "random");
      end
      in = '0;
      if (s < NIN) in[s] = 1'b1;
      check(s < NIN, "one-hot");
      in = '1;
      if (s < NIN) in[s] = 1'b0;
      check(1'b0, "one-cold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
