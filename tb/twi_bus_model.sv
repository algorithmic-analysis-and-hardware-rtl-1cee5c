// Behavioural model of a TWI sample communication system (master and slave
// together), for simulation only.
//
// The model drives the two open-drain bus lines as they appear on the wire,
// i.e. already the wired-AND of what master and slave pull low. Timing comes
// from two variables that a testbench may change between frames to select a
// bus mode: t_low_ns and t_high_ns, the SCL low and high times. Data changes
// in the middle of SCL low; Start and Stop move SDA while SCL is high, with
// t_high_ns before and after the SDA edge. Tasks:
//   start_cond / rep_start / stop_cond   bus conditions
//   put_bit(b, stretch_ns)               one bit; stretch_ns extends SCL low
//                                        (clock stretching by the slave)
//   put_byte(b, stretch_ns)              8 bits, MSB first
//   frame(addr, dir, data, n, nack_at, stop, stretch_ns)
//       Start, address, direction, n data bytes with their acknowledge bits.
//       Slave ACKs are 0 unless nack_at selects the slot (0 = address, k =
//       data byte k); in a read the master ACKs every byte but the last.
//       Ends with a Stop if stop is 1, else leaves SCL low for a
//       Repeated-Start (rep_start, then frame_after_sr).
module twi_bus_model #(
  parameter int unsigned LOW_NS  = 100,
  parameter int unsigned HIGH_NS = 100
) (
  output logic scl,
  output logic sda
);
  timeunit 1ns; timeprecision 1ps;

  int unsigned t_low_ns  = LOW_NS;
  int unsigned t_high_ns = HIGH_NS;

  initial begin
    scl = 1'b1;
    sda = 1'b1;
  end

  task automatic start_cond();
    sda = 1'b1;
    scl = 1'b1;
    #(t_high_ns * 1ns);
    sda = 1'b0;
    #(t_high_ns * 1ns);
    scl = 1'b0;
  endtask

  task automatic rep_start();
    #(t_low_ns / 2 * 1ns);
    sda = 1'b1;
    #(t_low_ns / 2 * 1ns);
    scl = 1'b1;
    #(t_high_ns * 1ns);
    sda = 1'b0;
    #(t_high_ns * 1ns);
    scl = 1'b0;
  endtask

  task automatic stop_cond();
    #(t_low_ns / 2 * 1ns);
    sda = 1'b0;
    #(t_low_ns / 2 * 1ns);
    scl = 1'b1;
    #(t_high_ns * 1ns);
    sda = 1'b1;
    #(2 * t_high_ns * 1ns);
  endtask

  task automatic put_bit(input logic b, input int unsigned stretch_ns = 0);
    #(t_low_ns / 2 * 1ns);
    sda = b;
    #((t_low_ns - t_low_ns / 2 + stretch_ns) * 1ns);
    scl = 1'b1;
    #(t_high_ns * 1ns);
    scl = 1'b0;
  endtask

  task automatic put_byte(input logic [7:0] b, input int unsigned stretch_ns = 0);
    for (int i = 7; i >= 0; i--) put_bit(b[i], (i == 7) ? stretch_ns : 0);
  endtask

  // everything of a frame after its Start or Repeated-Start
  task automatic frame_after_sr(input logic [6:0] addr, input logic dir,
                                input logic [7:0] data [], input int n,
                                input int nack_at = -1, input logic stop = 1'b1,
                                input int unsigned stretch_ns = 0);
    for (int i = 6; i >= 0; i--) put_bit(addr[i]);
    put_bit(dir);
    put_bit(nack_at == 0);
    for (int k = 1; k <= n; k++) begin
      put_byte(data[k-1], stretch_ns);
      if (dir) put_bit(k == n);            // master acknowledges a read
      else     put_bit(nack_at == k);      // slave acknowledges a write
    end
    if (stop) stop_cond();
  endtask

  task automatic frame(input logic [6:0] addr, input logic dir,
                       input logic [7:0] data [], input int n,
                       input int nack_at = -1, input logic stop = 1'b1,
                       input int unsigned stretch_ns = 0);
    start_cond();
    frame_after_sr(addr, dir, data, n, nack_at, stop, stretch_ns);
  endtask

endmodule
