// Testbench of sram_controller, with a behavioural SRAM behind it.
//
// Checks the pin mapping of every Avalon signal (active-low strobes, byte
// lanes, bus driven only while writing) and then writes random words and
// bytes through the bridge and reads them back against a copy kept here.
module sram_controller_tb;
  logic        clk = 0;
  logic        chipselect, read, write;
  logic [17:0] address;
  logic [1:0]  byteenable;
  logic [15:0] writedata, readdata;
  logic [15:0] dq_i, dq_o;
  logic        dq_oe;
  logic [17:0] sram_addr;
  logic        ub_n, lb_n, we_n, ce_n, oe_n;
  int checks = 0, failures = 0;

  sram_controller dut (
    .chipselect(chipselect), .read(read), .write(write), .address(address),
    .byteenable(byteenable), .writedata(writedata), .readdata(readdata),
    .sram_dq_i(dq_i), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe),
    .sram_addr(sram_addr), .sram_ub_n(ub_n), .sram_lb_n(lb_n),
    .sram_we_n(we_n), .sram_ce_n(ce_n), .sram_oe_n(oe_n));

  sram_model #(.DEPTH_LOG2(8)) u_mem (
    .addr(sram_addr), .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_i),
    .ce_n(ce_n), .we_n(we_n), .oe_n(oe_n), .ub_n(ub_n), .lb_n(lb_n));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic avalon_write(input logic [17:0] a, input logic [1:0] be, input logic [15:0] d);
    #1 chipselect = 1; write = 1; read = 0; address = a; byteenable = be; writedata = d;
    @(posedge clk);
    #1 write = 0; chipselect = 0;
    @(posedge clk);
  endtask

  task automatic avalon_read(input logic [17:0] a, output logic [15:0] d);
    #1 chipselect = 1; read = 1; write = 0; address = a; byteenable = 2'b11;
    @(posedge clk);                       // one wait state
    d = readdata;
    #1 read = 0; chipselect = 0;
  endtask

  logic [15:0] shadow [256];
  logic [15:0] d;
  initial begin
    chipselect = 0; read = 0; write = 0; address = 0; byteenable = 0; writedata = 0;
    for (int i = 0; i < 256; i++) shadow[i] = 0;
    // pin mapping
    for (int v = 0; v < 32; v++) begin
      {chipselect, read, write, byteenable} = 5'(v);
      address = 18'($urandom); writedata = 16'($urandom);
      #1;
      check(ce_n == !chipselect && oe_n == !read && we_n == !write &&
            ub_n == !byteenable[1] && lb_n == !byteenable[0] &&
            sram_addr == address && dq_oe == write && (!write || dq_o == writedata),
            $sformatf("pin mapping for control %b", 5'(v)));
    end
    chipselect = 0; read = 0; write = 0;
    @(posedge clk);
    // the sweep above wrote random words; clear the memory through the bridge
    for (int i = 0; i < 256; i++) avalon_write(18'(i), 2'b11, 16'h0);
    // random traffic
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0]  a  = 8'($urandom);
      automatic logic [1:0]  be = 2'(1 + $urandom % 3);
      automatic logic [15:0] wd = 16'($urandom);
      if ($urandom % 2) begin
        avalon_write({10'h0, a}, be, wd);
        if (be[1]) shadow[a][15:8] = wd[15:8];
        if (be[0]) shadow[a][7:0]  = wd[7:0];
      end else begin
        avalon_read({10'h0, a}, d);
        check(d == shadow[a], $sformatf("read %h: %h expected %h", a, d, shadow[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
