// seq_divider_tb: random and edge-case divisions checked against the
// quotient computed in the testbench, with the done pulse after W cycles.
module seq_divider_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [31:0] num, den, quot;

  seq_divider #(.W(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(logic [31:0] n, logic [31:0] d);
    int cyc;
    @(negedge clk); start = 1; num = n; den = d;
    @(negedge clk); start = 0; num = '0; den = '1;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; check(cyc < 40, "divider finishes"); if (cyc >= 40) return; end
    check(quot == n / d, $sformatf("%0d / %0d = %0d (got %0d)", n, d, n / d, quot));
  endtask

  initial begin
    start = 0; num = 0; den = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    divide(32'd1310720000, 32'd250000);      // reciprocal of 25 Gb/s
    divide(32'd0, 32'd7);
    divide(32'hFFFF_FFFF, 32'd1);
    divide(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    divide(32'd5, 32'd9);
    for (int i = 0; i < 300; i++) divide($urandom, ($urandom >> ($urandom % 32)) | 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
