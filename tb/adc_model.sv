// Behavioural model of the external two-channel serial ADC (not synthesizable).
//
// When the conversion input is seen high at a rising SCK edge, the model
// captures ch0_i and ch1_i and starts a 34-bit frame; from the next falling
// SCK edge on it drives one frame bit per falling edge, MSB first:
//   [33:32] filler, [31:18] channel 0 (12-bit sample and 2 extra LSBs),
//   [17:16] filler, [15:2] channel 1 (likewise), [1:0] filler.
// Filler and extra bits are pseudo-random so that a receiver that takes the
// wrong bits is caught. frames_o counts the frames started.
module adc_model (
  input  logic        sck_i,
  input  logic        conv_i,
  output logic        sdo_o,
  input  logic [11:0] ch0_i,
  input  logic [11:0] ch1_i,
  output int          frames_o
);
  logic [33:0] frame;
  int          idx;
  bit          armed;

  initial begin
    sdo_o    = 1'b0;
    frames_o = 0;
    idx      = 34;
    armed    = 0;
    frame    = '0;
  end

  always @(posedge sck_i) begin
    if (conv_i) begin
      frame    = {2'($urandom), ch0_i, 2'($urandom), 2'($urandom), ch1_i, 2'($urandom), 2'($urandom)};
      idx      = 0;
      armed    = 1;
      frames_o = frames_o + 1;
    end
  end

  always @(negedge sck_i) begin
    if (armed && idx < 34) begin
      sdo_o = frame[33 - idx];
      idx   = idx + 1;
    end else begin
      sdo_o = 1'($urandom);
    end
  end
endmodule
