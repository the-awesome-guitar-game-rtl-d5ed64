// I2C slave model for testbenches (write transfers only).
//
// Samples SCL and SDA on every system clock. A START (SDA falling while SCL is
// high) begins a transfer; each SCL rise shifts one bit in; after eight bits
// the model pulls SDA low for the ninth clock to acknowledge, unless the
// transfer number equals NACK_TRANSFER (then that transfer gets no
// acknowledge at all). While `enable` is low the bus is ignored.
// A STOP (SDA rising while SCL is high) ends the transfer
// and, if three bytes were received, records them in `trans`.
module i2c_slave_model #(
  parameter int MAX_TRANS     = 64,
  parameter int NACK_TRANSFER = -1
) (
  input  logic clk,
  input  logic enable,       // ignore the bus while low (e.g. during reset)
  input  logic scl,
  input  logic sda,          // resolved bus level
  output logic drive_low     // slave pulls SDA low
);

  logic [23:0] trans [MAX_TRANS];
  int          n_trans   = 0;   // completed three-byte transfers
  int          n_started = 0;   // STARTs seen
  int          n_stops   = 0;
  int          n_acked_bytes = 0;

  logic        scl_q = 1'b1, sda_q = 1'b1;
  logic        active = 1'b0;
  int          bitcnt = 0;      // bits of the current byte, 0..8
  int          nbytes = 0;
  logic [7:0]  shreg  = '0;
  logic [23:0] word   = '0;
  logic        ack_now = 1'b0;

  assign drive_low = ack_now;

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (!enable) begin
      active  <= 1'b0;
      ack_now <= 1'b0;
    end else if (scl && scl_q && sda_q && !sda) begin            // START
      active  <= 1'b1;
      bitcnt  <= 0;
      nbytes  <= 0;
      n_started <= n_started + 1;
    end else if (scl && scl_q && !sda_q && sda && active) begin  // STOP
      active <= 1'b0;
      n_stops <= n_stops + 1;
      if (nbytes == 3 && n_trans < MAX_TRANS) begin
        trans[n_trans] <= word;
        n_trans <= n_trans + 1;
      end
    end else if (active && scl && !scl_q) begin         // SCL rise
      if (bitcnt < 8) begin
        shreg  <= {shreg[6:0], sda};
        bitcnt <= bitcnt + 1;
      end else begin                                    // ack clock
        bitcnt <= 0;
      end
    end else if (active && !scl && scl_q) begin         // SCL fall
      if (bitcnt == 8) begin
        word   <= {word[15:0], shreg};
        nbytes <= nbytes + 1;
        if (n_started - 1 != NACK_TRANSFER) begin
          ack_now <= 1'b1;
          n_acked_bytes <= n_acked_bytes + 1;
        end
      end else begin
        ack_now <= 1'b0;
      end
    end
  end

endmodule
