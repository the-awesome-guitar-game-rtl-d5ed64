// Beat timer: Avalon slave with a 32-bit one-shot down-counting timer.
//
// The processor writes the low half of the count to address 0, the high half
// to address 1, and 1 to address 2 to start it. One clock after the start
// write the timer begins to count, decreasing by one per clock; when the count
// is zero it stops. The current count can be read back, low half at address
// 0 and high half at address 1 (zero-latency reads; 0 is returned when not
// reading). The register map and the count behaviour are those of the timer
// the original design wrote for following the beats of the song. The count is
// held in a down_counter that reloads while the timer is idle.
//
// Added in this design: `running` (the timer is counting) and `expired`, a
// one-clock pulse when a started count reaches zero, which the top uses to
// signal a beat through the sixth input controller. Reset also clears the
// count. Writes to the count while it runs take effect and counting goes on
// from the new value.
module beat_timer #(
  parameter int unsigned ADDR_WIDTH = 5
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  chipselect,
  input  logic                  read,
  input  logic                  write,
  input  logic [ADDR_WIDTH-1:0] address,
  input  logic [15:0]           writedata,
  output logic [15:0]           readdata,
  output logic                  running,
  output logic                  expired
);

  logic        we, re, wl, wh, ws;
  logic        start, count;
  logic [31:0] va, va_next;
  logic        load;

  assign we = chipselect && write;
  assign re = chipselect && read;
  assign wl = we && (address == ADDR_WIDTH'(0));
  assign wh = we && (address == ADDR_WIDTH'(1));
  assign ws = we && (address == ADDR_WIDTH'(2));

  // Value loaded whenever the counter is not decrementing.
  always_comb begin
    va_next = va;
    if (!reset_n)  va_next = '0;
    else if (wh)   va_next[31:16] = writedata;
    else if (wl)   va_next[15:0]  = writedata;
  end

  assign load = !reset_n || wh || wl || ws || !count || (va == '0);

  down_counter #(.WIDTH(32)) u_va (
    .clk   (clk),
    .load  (load),
    .di    (va_next),
    .count (va)
  );

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      start   <= 1'b0;
      count   <= 1'b0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      // A count write (wh, wl) changes only the counter, through its load.
      if (ws) begin
        start <= writedata[0];
      end else if (!(wh || wl)) begin
        if (start) begin
          count <= 1'b1;
          start <= 1'b0;
        end
        if (count && va == '0) begin
          count   <= 1'b0;
          start   <= 1'b0;
          expired <= 1'b1;
        end
      end
    end
  end

  assign running = count;

  always_comb begin
    readdata = '0;
    if (re && address == ADDR_WIDTH'(0))      readdata = va[15:0];
    else if (re && address == ADDR_WIDTH'(1)) readdata = va[31:16];
  end

endmodule
