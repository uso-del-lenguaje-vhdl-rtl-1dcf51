// Self-checking test of adc_interface against the behavioural ADC model.
// Sends a sequence of random sample pairs, one per frame, and checks that
// each pair appears on ch0_o/ch1_o at the following conversion, that valid_o
// pulses once per frame, that frames are CONV_PERIOD*2*SCK_HALF clocks apart
// and that each frame carries 34 SCK falling edges of data.
module tb_adc_interface;
  localparam int SCK_HALF = 2, CONV_PERIOD = 40;
  localparam int FRAME_CLKS = CONV_PERIOD * 2 * SCK_HALF;

  logic clk = 0, rst = 1;
  logic sck, conv, sdo, valid;
  logic [11:0] ch0, ch1, m0, m1;
  int frames;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_interface #(.SCK_HALF(SCK_HALF), .CONV_PERIOD(CONV_PERIOD)) dut (
    .clk_i(clk), .rst_i(rst), .sck_o(sck), .ad_conv_o(conv), .sdo_i(sdo),
    .ch0_o(ch0), .ch1_o(ch1), .valid_o(valid));

  adc_model adc (.sck_i(sck), .conv_i(conv), .sdo_o(sdo), .ch0_i(m0), .ch1_i(m1), .frames_o(frames));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // values sent in each frame, indexed by frame number
  logic [11:0] sent0 [0:63];
  logic [11:0] sent1 [0:63];
  int nvalid = 0;
  longint cyc = 0, last_valid = -1;

  always @(posedge clk) cyc++;

  // change the model's samples at every new frame
  always @(posedge sck) if (conv) begin
    sent0[frames % 64] = m0;
    sent1[frames % 64] = m1;
  end
  always @(negedge conv) begin
    m0 = 12'($urandom);
    m1 = 12'($urandom);
  end

  // count SCK falling edges between conversion pulses
  int fe_count = 0;
  always @(negedge sck) fe_count++;

  always @(posedge clk) if (!rst && valid) begin
    nvalid++;
    // the n-th valid (n >= 2) carries the frame started before it
    if (nvalid >= 2) begin
      check(ch0 == sent0[(frames - 1) % 64],
            $sformatf("ch0 %h expected %h (frame %0d)", ch0, sent0[(frames - 1) % 64], frames - 1));
      check(ch1 == sent1[(frames - 1) % 64],
            $sformatf("ch1 %h expected %h", ch1, sent1[(frames - 1) % 64]));
      check(cyc - last_valid == FRAME_CLKS,
            $sformatf("frame spacing %0d clocks, expected %0d", cyc - last_valid, FRAME_CLKS));
      check(fe_count == CONV_PERIOD, $sformatf("%0d SCK periods per frame", fe_count));
    end
    fe_count   = 0;
    last_valid = cyc;
  end

  initial begin
    m0 = 12'h5A3; m1 = 12'hA5C;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nvalid == 12);
    @(posedge clk);
    check(nvalid == 12, "valid count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * FRAME_CLKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
