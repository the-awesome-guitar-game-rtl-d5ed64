// Avalon-to-SRAM bridge for the board's 256K x 16 asynchronous SRAM.
//
// A purely combinational bridge, as in the original design: the Avalon
// address goes straight to the SRAM, chip select, read and write become the
// active-low CE, OE and WE strobes, the two byte enables become the active-low
// upper/lower byte strobes, and the data bus is driven with the write data
// only while `write` is high. Read data is the bus as the SRAM drives it.
// The bus is given here as separate input, output and output enable; the top
// joins them into the bidirectional pad (this split is this design's choice).
//
// Timing: no registers. The Avalon side must use zero read latency with one
// wait state for reads and none for writes, so that the SRAM's access time
// fits in the read cycle.
module sram_controller #(
  parameter int unsigned ADDR_WIDTH = 18,
  parameter int unsigned DATA_WIDTH = 16
) (
  // Avalon slave
  input  logic                    chipselect,
  input  logic                    read,
  input  logic                    write,
  input  logic [ADDR_WIDTH-1:0]   address,
  input  logic [1:0]              byteenable,
  input  logic [DATA_WIDTH-1:0]   writedata,
  output logic [DATA_WIDTH-1:0]   readdata,
  // SRAM pins
  input  logic [DATA_WIDTH-1:0]   sram_dq_i,
  output logic [DATA_WIDTH-1:0]   sram_dq_o,
  output logic                    sram_dq_oe,
  output logic [ADDR_WIDTH-1:0]   sram_addr,
  output logic                    sram_ub_n,
  output logic                    sram_lb_n,
  output logic                    sram_we_n,
  output logic                    sram_ce_n,
  output logic                    sram_oe_n
);

  assign sram_dq_o  = writedata;
  assign sram_dq_oe = write;
  assign readdata   = sram_dq_i;
  assign sram_addr  = address;
  assign sram_ub_n  = !byteenable[1];
  assign sram_lb_n  = !byteenable[0];
  assign sram_we_n  = !write;
  assign sram_ce_n  = !chipselect;
  assign sram_oe_n  = !read;

endmodule
