// Self-checking testbench of twi_condition_detector.
//
// A behavioural bus model plays a write frame (address 0x7E, two data bytes),
// a Repeated-Start, a one-byte read and a Stop. Independently of the
// detector, the testbench lists every bit the model puts on the wire and
// checks that the detector reports exactly these bits in order, exactly two
// Starts and one Stop at the right moments, and that each bit pulse appears
// SYNC_STAGES clock edges after the SCL rising edge at the pin (checked one
// edge later, where the pulse is sampled).
module twi_condition_detector_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned SYNC = 2;
  localparam int unsigned CLK_NS = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl, sda;
  logic start_p, stop_p, bit_p, sda_b;
  int checks = 0, failures = 0;

  always #(CLK_NS/2 * 1ns) clk = ~clk;

  twi_bus_model #(.LOW_NS(100), .HIGH_NS(100)) bus (.scl(scl), .sda(sda));

  twi_condition_detector #(.SYNC_STAGES(SYNC)) dut (
    .clk(clk), .rst_n(rst_n), .scl_i(scl), .sda_i(sda),
    .start_o(start_p), .stop_o(stop_p), .bit_o(bit_p), .sda_o(sda_b));

  logic exp_bits[$];
  int   n_start = 0, n_stop = 0, n_bits = 0;
  time  t_rise = 0;
  int   phase = 0;   // 1: inside first frame, 2: after the Repeated-Start, 3: after Stop

  always @(posedge scl) t_rise = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (start_p) n_start++;
    if (stop_p)  n_stop++;
    if (bit_p) begin
      n_bits++;
      check(exp_bits.size() > 0, "unexpected bit");
      if (exp_bits.size() > 0) check(sda_b == exp_bits.pop_front(), "bit value");
      check($time - t_rise == 64'(SYNC * CLK_NS + CLK_NS/2), "bit latency");
    end
  end

  logic [7:0] wr [] = '{8'hFF, 8'hA5};
  logic [7:0] rd [] = '{8'h3C};

  initial begin
    #(200ns);
    rst_n = 1'b1;
    #(200ns);
    // expected bit stream of the write frame: address, R/W, ACK, 2 x (byte, ACK)
    for (int i = 6; i >= 0; i--) exp_bits.push_back(1'(7'h7E >> i));
    exp_bits.push_back(1'b0);
    exp_bits.push_back(1'b0);
    foreach (wr[k]) begin
      for (int i = 7; i >= 0; i--) exp_bits.push_back(wr[k][i]);
      exp_bits.push_back(1'b0);
    end
    exp_bits.push_back(1'b1);    // SCL rising edge of the Repeated-Start slot
    bus.frame(7'h7E, 1'b0, wr, 2, -1, 1'b0);
    bus.rep_start();
    check(n_start == 2, "two Starts seen");
    check(n_stop == 0, "no Stop yet");
    for (int i = 6; i >= 0; i--) exp_bits.push_back(1'(7'h51 >> i));
    exp_bits.push_back(1'b1);
    exp_bits.push_back(1'b0);
    for (int i = 7; i >= 0; i--) exp_bits.push_back(rd[0][i]);
    exp_bits.push_back(1'b1);    // master NACK
    exp_bits.push_back(1'b0);    // SCL rising edge of the Stop slot
    bus.frame_after_sr(7'h51, 1'b1, rd, 1);
    #(200ns);
    check(n_start == 2, "Start count");
    check(n_stop == 1, "Stop count");
    check(n_bits == 9 + 18 + 1 + 9 + 9 + 1, "bit count");
    check(exp_bits.size() == 0, "all bits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1ms);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
