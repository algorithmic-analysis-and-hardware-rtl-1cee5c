// Testbench of the TWI analyser with its byte capacity raised from the
// default 2 to MAX_BYTES = 4, to show that the capacity is a true parameter.
//
// A behavioural bus model plays Fast-mode frames with 0 to 6 data bytes in
// both directions. The testbench checks that the first min(n, 4) bytes are
// captured in order, that BUSY is reached exactly when more than four bytes
// are sent (or when a read ends with NACK), that a write NACK on byte 4 is
// still an error and one on byte 5 is not, and that the bit count is
// 11 + 9n at DONE.
module twi_analyser_capacity_tb;
  import twi_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int MAXB = 4;

  logic clk = 1'b0, rst_n = 1'b0, op_reset = 1'b0;
  logic scl, sda;
  state_t      state;
  logic [7:0]  address;
  logic        dir, rflag, wflag, err, busy, done, exp_stop, exp_byte;
  logic [7:0]  data [MAXB];
  logic [2:0]  count;
  logic [15:0] bit_index;
  int checks = 0, failures = 0;
  int n_busy_full = 0;

  initial begin
    #3ns;
    forever #10ns clk = ~clk;
  end

  twi_bus_model #(.LOW_NS(1300), .HIGH_NS(1200)) bus (.scl(scl), .sda(sda));

  twi_analyser #(.MAX_BYTES(MAXB)) dut (
    .clk(clk), .rst_n(rst_n), .op_reset_i(op_reset), .scl_i(scl), .sda_i(sda),
    .state_o(state), .address_o(address), .dir_o(dir),
    .read_flag_o(rflag), .write_flag_o(wflag), .data_o(data),
    .byte_count_o(count), .error_o(err), .busy_o(busy), .done_o(done),
    .expect_stop_o(exp_stop), .expect_byte_o(exp_byte), .bit_index_o(bit_index));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (state %s)", what, $time, state.name());
    end
  endtask

  always @(negedge clk) if (busy && count == 3'(MAXB)) n_busy_full++;

  task automatic run(input logic [6:0] a, input logic d, input logic [7:0] db [],
                     input int n, input int nack_at);
    int cap;
    bit error_exp;
    int busy_before;
    busy_before = n_busy_full;
    bus.frame(a, d, db, n, nack_at);
    repeat (5) @(negedge clk);
    error_exp = (nack_at == 0) || (!d && nack_at >= 1 && nack_at <= MAXB);
    cap = error_exp ? nack_at : ((n < MAXB) ? n : MAXB);
    check(address == {1'b0, a} && dir == d, "address and direction");
    check(int'(count) == cap, "byte count");
    for (int k = 0; k < cap; k++) check(data[k] == db[k], "data byte");
    check(err == error_exp, "error flag");
    if (!error_exp) begin
      check(done, "DONE");
      check(int'(bit_index) == 11 + 9 * n, "bit count");
      check((n_busy_full > busy_before) == (n >= MAXB), "BUSY only when full");
    end
    @(negedge clk) op_reset = 1'b1;
    @(negedge clk) op_reset = 1'b0;
  endtask

  logic [7:0] db [];

  initial begin
    db = new[6];
    #200ns;
    rst_n = 1'b1;
    #200ns;
    for (int n = 0; n <= 6; n++) begin
      for (int k = 0; k < 6; k++) db[k] = 8'($urandom);
      run(7'd126, 1'b0, db, n, -1);
      if (n > 0) run(7'd126, 1'b1, db, n, -1);
    end
    run(7'h31, 1'b0, db, 4, 4);    // NACK within capacity: error
    run(7'h31, 1'b0, db, 5, 5);    // NACK beyond capacity: not examined
    check(n_busy_full > 0, "capacity reached at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
