// Write-only I2C master for one three-byte transfer.
//
// Sends `data` as slave address, register and value: a START, three bytes MSB
// first, each followed by a released bit in which the slave acknowledges, and
// a STOP. The transfer is a fixed sequence of steps counted by a 6-bit step
// counter, one step per `tick`; the counter is held at 0 while `go` is low and
// stops at 63. Each step sets the registered bus levels for the next step
// period:
//   step 0      idle levels, clear done and acknowledge flags
//   step 1      latch data, SDA low while SCL high (START)
//   step 2      SCL low
//   steps 3-29  27 bit slots: 8 address bits, ack, 8 register bits, ack,
//               8 value bits, ack (SDA released in the ack slots; the level
//               the slave drives is sampled at the end of each ack slot)
//   steps 30-32 SDA low, SCL high, SDA high (STOP), done
// During step periods 4 to 30 SCL is the inverted control clock, so each bit
// slot has one SCL pulse in its second half while the data is steady.
//
// This step sequence, the 27 clocked slots and the flags follow the board's
// original I2C controller. This design's choices: it runs on the system clock
// with a step enable instead of on a divided clock; SCL is high in the second
// half of a slot (the original gates the control clock itself, so its data
// changes as SCL rises); `done` is low after reset so that the first transfer
// is waited for; SDA is an open-drain pair (sda_drive_low, sda_i).
//
// nack is 1 when any of the three acknowledge slots read high.
module i2c_controller (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,        // one clock per step, at the control clock's rise
  input  logic        ctrl_clk,    // control clock level
  input  logic [23:0] data,        // {slave address, register, value}
  input  logic        go,
  output logic        done,
  output logic        nack,
  output logic        scl,
  input  logic        sda_i,
  output logic        sda_drive_low
);

  logic [5:0]  step;
  logic [23:0] sd;
  logic        sdo, sclk;
  logic [2:0]  ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step <= 6'h3F;
    end else if (tick) begin
      if (!go)               step <= '0;
      else if (step != 6'h3F) step <= step + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk <= 1'b1;
      sdo  <= 1'b1;
      ack  <= '0;
      done <= 1'b0;
      sd   <= '0;
    end else if (tick) begin
      if (step == 6'd0) begin
        ack  <= '0;
        done <= 1'b0;
        sdo  <= 1'b1;
        sclk <= 1'b1;
      end else if (step == 6'd1) begin
        sd  <= data;
        sdo <= 1'b0;
      end else if (step == 6'd2) begin
        sclk <= 1'b0;
      end else if (step >= 6'd3 && step <= 6'd29) begin
        // 27 slots: byte b (0..2), bit slot k (0..8), k == 8 is the ack slot
        automatic int unsigned slot = 32'(step) - 3;
        automatic int unsigned b    = slot / 9;
        automatic int unsigned k    = slot % 9;
        if (k == 8) sdo <= 1'b1;
        else        sdo <= sd[23 - 8*b - k];
        // the previous slot was an ack slot: sample what the slave drove
        if (k == 0 && b > 0) ack[b-1] <= sda_i;
      end else if (step == 6'd30) begin
        sdo    <= 1'b0;
        sclk   <= 1'b0;
        ack[2] <= sda_i;
      end else if (step == 6'd31) begin
        sclk <= 1'b1;
      end else if (step == 6'd32) begin
        sdo  <= 1'b1;
        done <= 1'b1;
      end
    end
  end

  assign scl           = sclk || ((step >= 6'd4 && step <= 6'd30) && !ctrl_clk);
  assign sda_drive_low = !sdo;
  assign nack          = |ack;

endmodule
