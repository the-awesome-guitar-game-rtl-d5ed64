// Power-up configuration of the board's audio codec and video decoder over I2C.
//
// After reset the block walks a table of LUT_SIZE 16-bit register writes and
// sends each one as a three-byte I2C write through i2c_controller: entries
// 0-9 go to the audio codec (I2C address 0x34: line-in and headphone levels,
// analogue and digital paths, power, data format, sampling control,
// activation), entries 10 and up to the video decoder (address 0x40). A write
// that is not acknowledged is sent again; after the last entry the bus stays
// idle and config_done is high.
//
// Clocking: a divider counts CLK_FREQ/I2C_FREQ + 1 system clocks per half
// period of a control clock (about 10 kHz with the defaults); both this
// sequencer and the I2C controller advance by one step at each rise of the
// control clock, which is given to them as a one-clock `tick`.
// Per entry the sequencer takes three kinds of step: LOAD the word and raise
// GO, WAIT for the controller's done (drop GO), then NEXT entry, or RETRY the
// same entry if an acknowledge was missing. NEXT and RETRY both leave GO low
// for two steps, so the controller has cleared its done flag before the
// sequencer waits on it again. One write takes about 37 control clock periods.
//
// The table contents, the two slave addresses, the frequencies and the
// sequencing are those of the board's original configuration block. This
// design's own: the divider toggle (the original's divider line is read as an
// inversion), the RETRY step (the original retries at once and can take the
// previous transfer's done flag for the new one), and config_done.
module i2c_av_config #(
  parameter int unsigned CLK_FREQ = 50_000_000,
  parameter int unsigned I2C_FREQ = 20_000,
  parameter int unsigned LUT_SIZE = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic scl,
  input  logic sda_i,
  output logic sda_drive_low,
  output logic config_done
);

  localparam int unsigned DIV       = CLK_FREQ / I2C_FREQ;
  localparam int unsigned DIV_W     = $clog2(DIV + 2);
  localparam int unsigned SET_VIDEO = 10;
  localparam logic [7:0]  AUDIO_DEV = 8'h34;
  localparam logic [7:0]  VIDEO_DEV = 8'h40;

  typedef enum logic [1:0] {
    ST_LOAD = 2'd0,
    ST_WAIT = 2'd1,
    ST_NEXT = 2'd2,
    ST_RETRY = 2'd3
  } setup_state_e;

  logic [DIV_W-1:0] div_cnt;
  logic             ctrl_clk;
  logic             tick;
  logic [5:0]       lut_index;
  logic [15:0]      lut_data;
  logic [23:0]      i2c_data;
  logic             i2c_go, i2c_done, i2c_nack;
  setup_state_e     setup_st;

  // Control clock: toggles every DIV + 1 system clocks.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      ctrl_clk <= 1'b0;
    end else if (32'(div_cnt) < DIV) begin
      div_cnt <= div_cnt + 1'b1;
    end else begin
      div_cnt  <= '0;
      ctrl_clk <= !ctrl_clk;
    end
  end

  assign tick = (32'(div_cnt) >= DIV) && !ctrl_clk;

  i2c_controller u_i2c (
    .clk           (clk),
    .rst_n         (rst_n),
    .tick          (tick),
    .ctrl_clk      (ctrl_clk),
    .data          (i2c_data),
    .go            (i2c_go),
    .done          (i2c_done),
    .nack          (i2c_nack),
    .scl           (scl),
    .sda_i         (sda_i),
    .sda_drive_low (sda_drive_low)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lut_index <= '0;
      setup_st  <= ST_LOAD;
      i2c_go    <= 1'b0;
      i2c_data  <= '0;
    end else if (tick && 32'(lut_index) < LUT_SIZE) begin
      unique case (setup_st)
        ST_LOAD: begin
          i2c_data <= {(32'(lut_index) < SET_VIDEO) ? AUDIO_DEV : VIDEO_DEV, lut_data};
          i2c_go   <= 1'b1;
          setup_st <= ST_WAIT;
        end
        ST_WAIT: begin
          if (i2c_done) begin
            i2c_go   <= 1'b0;
            setup_st <= i2c_nack ? ST_RETRY : ST_NEXT;
          end
        end
        ST_NEXT: begin
          lut_index <= lut_index + 1'b1;
          setup_st  <= ST_LOAD;
        end
        ST_RETRY: setup_st <= ST_LOAD;   // same entry again
        default:  setup_st <= ST_LOAD;
      endcase
    end
  end

  assign config_done = (32'(lut_index) >= LUT_SIZE);

  // Register writes: {register address << 1 | data bit 8, data bits 7..0}.
  always_comb begin
    unique case (lut_index)
      // audio codec
      6'd0:  lut_data = 16'h001A;   // left line in
      6'd1:  lut_data = 16'h021A;   // right line in
      6'd2:  lut_data = 16'h047B;   // left headphone out
      6'd3:  lut_data = 16'h067B;   // right headphone out
      6'd4:  lut_data = 16'h08F8;   // analogue path
      6'd5:  lut_data = 16'h0A06;   // digital path
      6'd6:  lut_data = 16'h0C00;   // power down control
      6'd7:  lut_data = 16'h0E01;   // interface format
      6'd8:  lut_data = 16'h1002;   // sampling control
      6'd9:  lut_data = 16'h1201;   // active
      // video decoder
      6'd10: lut_data = 16'h1500;
      6'd11: lut_data = 16'h1741;
      6'd12: lut_data = 16'h3a16;
      6'd13: lut_data = 16'h5004;
      6'd14: lut_data = 16'hc305;
      6'd15: lut_data = 16'hc480;
      6'd16: lut_data = 16'h0e80;
      6'd17: lut_data = 16'h5020;
      6'd18: lut_data = 16'h5218;
      6'd19: lut_data = 16'h58ed;
      6'd20: lut_data = 16'h77c5;
      6'd21: lut_data = 16'h7c93;
      6'd22: lut_data = 16'h7d00;
      6'd23: lut_data = 16'hd048;
      6'd24: lut_data = 16'hd5a0;
      6'd25: lut_data = 16'hd7ea;
      6'd26: lut_data = 16'he43e;
      6'd27: lut_data = 16'hea0f;
      6'd28: lut_data = 16'h3112;
      6'd29: lut_data = 16'h3281;
      6'd30: lut_data = 16'h3384;
      6'd31: lut_data = 16'h37A0;
      6'd32: lut_data = 16'he580;
      6'd33: lut_data = 16'he603;
      6'd34: lut_data = 16'he785;
      6'd35: lut_data = 16'h5000;
      6'd36: lut_data = 16'h5100;
      6'd37: lut_data = 16'h0050;
      6'd38: lut_data = 16'h1000;
      6'd39: lut_data = 16'h0402;
      6'd40: lut_data = 16'h0b00;
      6'd41: lut_data = 16'h0a20;
      6'd42: lut_data = 16'h1100;
      6'd43: lut_data = 16'h2b00;
      6'd44: lut_data = 16'h2c8c;
      6'd45: lut_data = 16'h2df2;
      6'd46: lut_data = 16'h2eee;
      6'd47: lut_data = 16'h2ff4;
      6'd48: lut_data = 16'h30d2;
      6'd49: lut_data = 16'h0e05;
      default: lut_data = 16'h0000;
    endcase
  end

endmodule
