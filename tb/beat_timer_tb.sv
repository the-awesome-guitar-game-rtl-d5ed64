// Testbench of beat_timer: load both halves, read them back, start, watch the
// count fall by one per clock, check the expiry pulse time, and check that a
// timer left unstarted keeps its value.
module beat_timer_tb;
  logic        clk = 0, reset_n;
  logic        chipselect, read, write;
  logic [4:0]  address;
  logic [15:0] writedata, readdata;
  logic        running, expired;
  int checks = 0, failures = 0;

  beat_timer dut (.clk(clk), .reset_n(reset_n), .chipselect(chipselect),
    .read(read), .write(write), .address(address), .writedata(writedata),
    .readdata(readdata), .running(running), .expired(expired));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [15:0] d);
    #1 chipselect = 1; write = 1; address = a; writedata = d;
    @(posedge clk); #1 chipselect = 0; write = 0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [15:0] d);
    #1 chipselect = 1; read = 1; address = a;
    #1 d = readdata;
    @(posedge clk); #1 chipselect = 0; read = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] lo, hi;
  logic [31:0] v;
  int t;
  initial begin
    reset_n = 0; chipselect = 0; read = 0; write = 0; address = 0; writedata = 0;
    repeat (3) @(posedge clk);
    #1 reset_n = 1;
    wr(5'd1, 16'hBEEF); wr(5'd0, 16'h1234);
    rd(5'd0, lo); rd(5'd1, hi);
    check(lo == 16'h1234 && hi == 16'hBEEF, $sformatf("readback %h_%h", hi, lo));
    repeat (10) @(posedge clk);
    rd(5'd0, lo);
    check(lo == 16'h1234 && !running, "value held while not started");
    #1 chipselect = 0;
    check(readdata == 16'h0, "readdata zero when not read");

    for (int trial = 0; trial < 3; trial++) begin
      automatic int n = 50 + trial * 37;
      wr(5'd1, 16'h0); wr(5'd0, 16'(n));
      wr(5'd2, 16'h1);                      // start
      // one clock later it counts
      @(posedge clk); #1;
      check(running, "running after start");
      rd(5'd0, lo);                         // sampled before the first decrement
      check(lo == 16'(n), $sformatf("first counting clock: %0d", lo));
      rd(5'd0, lo);
      check(lo == 16'(n - 1), $sformatf("one clock later: %0d", lo));
      t = 0;
      while (!expired && t < 2 * n) begin @(posedge clk); #1; t++; end
      // from the start write: one clock to start, n decrements, one clock to
      // see zero; 3 clocks were spent above
      check(t + 3 == n + 2, $sformatf("expiry %0d clocks after start, expected %0d", t + 3, n + 2));
      @(posedge clk); #1;
      check(!expired && !running, "expiry is a single pulse and the timer stops");
      rd(5'd0, lo); rd(5'd1, hi);
      check(lo == 0 && hi == 0, "count is zero after expiry");
    end
    // a write of 0 to the start register does not start
    wr(5'd0, 16'd20); wr(5'd2, 16'h0);
    repeat (5) @(posedge clk); #1;
    check(!running, "start bit 0 does not start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
