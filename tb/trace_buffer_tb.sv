// trace_buffer_tb: self-checking test of the circular trace buffer.
//
// Runs the default 32 x 1024 buffer. Writes random words with a random
// enable for 2.5 buffer lengths and keeps its own copy of the last 1024
// written words. Checks the write pointer and the wrapped flag every cycle,
// that disabled cycles store nothing, then reads back every address (one
// cycle read latency) and compares with the copy. A second phase checks that
// reset clears the pointer and the flag.
module trace_buffer_tb;
  localparam int unsigned W = 32, DEPTH = 1024, AW = 10;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en;
  logic [W-1:0]  din, rd_data;
  logic [AW-1:0] rd_addr, wr_ptr;
  logic          wrapped;
  logic [W-1:0]  model [DEPTH];
  int            writes = 0, skipped = 0;

  trace_buffer dut (.clk, .rst_n, .wr_en, .din, .rd_addr, .rd_data, .wr_ptr, .wrapped);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; din = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    chk(wr_ptr == 0 && !wrapped, "reset pointer");
    while (writes < DEPTH * 5 / 2) begin
      wr_en = ($urandom % 4) != 0;
      din   = $urandom;
      @(posedge clk);
      if (wr_en) begin
        model[writes % DEPTH] = din;
        writes++;
      end else begin
        skipped++;
      end
      @(negedge clk);
      chk(wr_ptr == AW'(writes % DEPTH), $sformatf("pointer after %0d writes", writes));
      chk(wrapped == (writes >= DEPTH), "wrapped flag");
    end
    chk(skipped > 0, "some cycles not enabled");
    wr_en = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = AW'(a);
      @(posedge clk);
      @(negedge clk);
      chk(rd_data == model[a], $sformatf("read addr %0d got %h exp %h", a, rd_data, model[a]));
    end
    rst_n = 1'b0;
    @(negedge clk);
    chk(wr_ptr == 0 && !wrapped, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
