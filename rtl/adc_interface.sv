// Serial interface to a two-channel, 12-bit-per-channel ADC.
//
// A frame starts with a one-SCK-period conversion pulse (ad_conv_o). On every
// falling edge of SCK after it, a read counter loaded with RD_TMO (34) counts
// down and one bit of sdo_i is shifted, MSB first, into a 34-bit shift
// register, so one frame holds both samples plus a few don't-care bits. At the
// next conversion pulse the two samples are copied to the outputs: channel 0
// from shift-register bits 31..20 and channel 1 from bits 15..4, and valid_o
// pulses for one clock. Samples are 12-bit two's complement.
//
// The read counter, the 34-bit frame and the bit positions of the two samples
// follow the document. SCK generation (clk divided by 2*SCK_HALF), the
// conversion rate (one frame every CONV_PERIOD SCK periods) and the valid_o
// strobe are this design's choices. Reset is asynchronous and active high,
// as in the document.
module adc_interface #(
  parameter int RD_TMO      = 34,   // bits read per frame
  parameter int SCK_HALF    = 2,    // clk cycles per SCK half period
  parameter int CONV_PERIOD = 40    // SCK periods per conversion frame
) (
  input  logic        clk_i,
  input  logic        rst_i,
  output logic        sck_o,
  output logic        ad_conv_o,
  input  logic        sdo_i,
  output logic [11:0] ch0_o,
  output logic [11:0] ch1_o,
  output logic        valid_o
);

  localparam int DW = $clog2(SCK_HALF + 1);
  localparam int CW = $clog2(CONV_PERIOD + 1);
  localparam int RW = $clog2(RD_TMO + 1);

  logic [DW-1:0]     div_q;
  logic              sck_q;
  logic              sck_fe;          // this clock edge takes SCK high->low
  logic [CW-1:0]     conv_cnt_q;
  logic              ad_conv_q;
  logic [RW-1:0]     rd_cntr_q;
  logic [RD_TMO-1:0] shift_q;

  assign sck_fe = sck_q && (div_q == DW'(SCK_HALF - 1));

  // SCK divider
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      div_q <= '0;
      sck_q <= 1'b0;
    end else if (div_q == DW'(SCK_HALF - 1)) begin
      div_q <= '0;
      sck_q <= ~sck_q;
    end else begin
      div_q <= div_q + 1'b1;
    end
  end

  // Conversion pulse: high during the first SCK period of each frame
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      conv_cnt_q <= '0;
      ad_conv_q  <= 1'b0;
    end else if (sck_fe) begin
      ad_conv_q  <= (conv_cnt_q == '0);
      conv_cnt_q <= (conv_cnt_q == CW'(CONV_PERIOD - 1)) ? '0 : conv_cnt_q + 1'b1;
    end
  end

  // Read counter, shift register and sample capture
  always_ff @(posedge clk_i or posedge rst_i) begin
    if (rst_i) begin
      rd_cntr_q <= RW'(RD_TMO);
      shift_q   <= '0;
      ch0_o     <= '0;
      ch1_o     <= '0;
      valid_o   <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (sck_fe) begin
        if (ad_conv_q)             rd_cntr_q <= RW'(RD_TMO);
        else if (rd_cntr_q != '0)  rd_cntr_q <= rd_cntr_q - 1'b1;

        if (rd_cntr_q != '0)       shift_q <= {shift_q[RD_TMO-2:0], sdo_i};

        if (ad_conv_q) begin
          ch0_o   <= shift_q[31:20];
          ch1_o   <= shift_q[15:4];
          valid_o <= 1'b1;
        end
      end
    end
  end

  assign sck_o     = sck_q;
  assign ad_conv_o = ad_conv_q;

endmodule
