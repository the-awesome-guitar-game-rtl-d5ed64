// Asynchronous 16-bit SRAM model for testbenches (behavioural).
//
// Stands in for the board's 256K x 16 SRAM with active-low chip, write,
// output and byte-lane enables. Cells follow the data bus while WE_N and CE_N
// are low, on the selected byte lanes; reads return the addressed word while
// CE_N and OE_N are low and WE_N is high, otherwise 0 on the bus. Only
// 2**DEPTH_LOG2 words are modelled; upper address bits are ignored.
module sram_model #(
  parameter int DEPTH_LOG2 = 10
) (
  input  logic [17:0] addr,
  input  logic [15:0] dq_in,     // bus as driven by the controller
  input  logic        dq_in_en,
  output logic [15:0] dq_out,    // bus as driven by the SRAM
  input  logic        ce_n,
  input  logic        we_n,
  input  logic        oe_n,
  input  logic        ub_n,
  input  logic        lb_n
);

  logic [15:0] mem [2**DEPTH_LOG2];
  logic        wr_active;

  initial for (int i = 0; i < 2**DEPTH_LOG2; i++) mem[i] = 16'h0;

  assign wr_active = !ce_n && !we_n;

  // Level-sensitive write: the cell follows the bus while WE_N and CE_N are low.
  always @* begin
    if (wr_active && dq_in_en) begin
      if (!ub_n) mem[addr[DEPTH_LOG2-1:0]][15:8] = dq_in[15:8];
      if (!lb_n) mem[addr[DEPTH_LOG2-1:0]][7:0]  = dq_in[7:0];
    end
  end

  always_comb begin
    dq_out = '0;
    if (!ce_n && !oe_n && we_n) dq_out = mem[addr[DEPTH_LOG2-1:0]];
  end

endmodule
