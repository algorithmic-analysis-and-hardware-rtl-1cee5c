// Self-checking testbench of twi_monitor_fsm.
//
// The detector's events (start, stop, bit with its SDA value) are driven
// directly, one pulse per event with idle cycles between. For each frame the
// expected capture is worked out from the protocol rules alone: the address
// and direction, min(n, MAX_BYTES) data bytes, an error at a slave NACK met
// before the capacity is reached, the prediction of the last acknowledge slot
// examined, and the bit count 11 + 9n of equation (1) at the Stop (10 + 9k
// when the frame stops in ACK_ERROR after k bytes). Directed cases cover each
// state transition of the document's state machine, the operator reset, a
// Repeated-Start, a Stop in READ_ADDR and bus events ignored in DONE and
// ACK_ERROR, and the NACKed master code that precedes a High-Speed-mode
// frame; 300 random frames follow.
module twi_monitor_fsm_tb;
  import twi_pkg::*;
  localparam int MAXB = 2;

  logic clk = 1'b0, rst_n = 1'b0, op_reset = 1'b0;
  logic start_i = 1'b0, stop_i = 1'b0, bit_i = 1'b0, sda_i = 1'b1;
  state_t     state;
  logic [7:0] address;
  logic       dir, rflag, wflag, err, busy, done, exp_stop, exp_byte;
  logic [7:0] data [MAXB];
  logic [1:0] count;
  logic [15:0] bit_index;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  twi_monitor_fsm #(.MAX_BYTES(MAXB), .BIT_INDEX_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .op_reset_i(op_reset),
    .start_i(start_i), .stop_i(stop_i), .bit_i(bit_i), .sda_i(sda_i),
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

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    @(negedge clk) sig = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic ev_start(); pulse(start_i); endtask
  task automatic ev_stop();  pulse(stop_i);  endtask
  task automatic ev_bit(input logic b);
    sda_i = b;
    pulse(bit_i);
  endtask
  task automatic ev_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) ev_bit(b[i]);
  endtask
  task automatic do_op_reset(); pulse(op_reset); endtask

  // Plays a frame up to (not including) its end. nack_at: slave NACK slot.
  task automatic body(input logic [6:0] a, input logic d, input logic [7:0] db [],
                      input int n, input int nack_at);
    ev_start();
    for (int i = 6; i >= 0; i--) ev_bit(a[i]);
    ev_bit(d);
    ev_bit(nack_at == 0);
    for (int k = 1; k <= n; k++) begin
      ev_byte(db[k-1]);
      ev_bit(d ? (k == n) : (nack_at == k));
    end
  endtask

  // Expected result of a complete frame (Start ... Stop).
  task automatic check_frame(input logic [6:0] a, input logic d, input logic [7:0] db [],
                             input int n, input int nack_at);
    int  cap;
    bit  error_exp, mcode;
    mcode = (a[6:2] == 5'b00001);     // High-Speed-mode master code
    error_exp = (nack_at == 0 && !mcode) || (!d && nack_at >= 1 && nack_at <= MAXB);
    cap = error_exp ? nack_at : ((n < MAXB) ? n : MAXB);
    check(address == {1'b0, a}, "address");
    check(dir == d && rflag == d && wflag == !d, "direction flags");
    check(int'(count) == cap, "byte count");
    for (int k = 0; k < cap; k++) check(data[k] == db[k], "data byte");
    for (int k = cap; k < MAXB; k++) check(data[k] == 8'h00, "uncaptured slot stays clear");
    check(err == error_exp, "error flag");
    if (error_exp) begin
      check(state == ACK_ERROR, "ends in ACK_ERROR");
      check(int'(bit_index) == 10 + 9 * nack_at, "bit index at error");
    end else begin
      check(state == DONE && done, "ends in DONE");
      check(int'(bit_index) == 11 + 9 * n, "bit index, equation (1)");
      if (nack_at == 0) check(d ? exp_stop : !exp_stop, "master code NACK prediction");
      else if (!d)     check(exp_stop && exp_byte, "write prediction");
      else if (n <= MAXB) check(exp_stop && !exp_byte, "read NACK prediction");
      else             check(!exp_stop && exp_byte, "read ACK prediction");
    end
  endtask

  task automatic full_frame(input logic [6:0] a, input logic d, input logic [7:0] db [],
                            input int n, input int nack_at);
    body(a, d, db, n, nack_at);
    ev_bit(1'b0);     // SCL rising edge of the Stop slot
    ev_stop();
    check_frame(a, d, db, n, nack_at);
    do_op_reset();
    check(state == IDLE && !err && count == 0 && address == 0, "operator reset clears");
  endtask

  logic [7:0] db [];
  int n_busy = 0;
  always @(posedge clk) if (state == BUSY) n_busy++;

  initial begin
    db = new[4];
    db = '{8'hFF, 8'hFF, 8'h12, 8'h34};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(state == IDLE, "reset state");
    // bits without a Start are ignored
    ev_bit(1'b1);
    check(state == IDLE && bit_index == 0, "IDLE ignores bits");

    // sample communication: address 126, one and two data bytes of 255
    full_frame(7'd126, 1'b0, db, 1, -1);
    full_frame(7'd126, 1'b0, db, 2, -1);
    full_frame(7'd126, 1'b1, db, 1, -1);
    full_frame(7'd126, 1'b1, db, 2, -1);
    // beyond the capacity: BUSY then DONE
    full_frame(7'h15, 1'b0, db, 4, -1);
    check(n_busy > 0, "BUSY visited");
    full_frame(7'h15, 1'b1, db, 3, -1);
    // address NACK, data NACK, NACK after capacity reached
    full_frame(7'h42, 1'b0, db, 0, 0);
    full_frame(7'h42, 1'b1, db, 0, 0);
    full_frame(7'h42, 1'b0, db, 1, 1);
    full_frame(7'h42, 1'b0, db, 2, 2);
    full_frame(7'h42, 1'b0, db, 3, 3);

    // High-Speed-mode master code 0000 1010, NACKed: BUSY, no error; the
    // Repeated-Start begins the Hs-mode frame
    body(7'b0000101, 1'b0, db, 0, 0);
    check(state == BUSY && !err, "master code NACK -> BUSY");
    ev_bit(1'b1);
    body(7'd126, 1'b0, db, 2, -1);
    ev_bit(1'b0);
    ev_stop();
    check_frame(7'd126, 1'b0, db, 2, -1);
    do_op_reset();
    full_frame(7'b0000111, 1'b1, db, 0, 0);

    // state sequence of a write frame, bit by bit
    ev_start();
    check(state == READ_ADDR && bit_index == 1, "Start -> READ_ADDR");
    for (int i = 6; i >= 0; i--) begin
      check(state == READ_ADDR, "stays in READ_ADDR for 7 bits");
      ev_bit(1'(7'h5A >> i));
    end
    check(state == READ_DIR, "READ_ADDR -> READ_DIR");
    ev_bit(1'b0);
    check(state == ACK_DETECT && wflag, "READ_DIR -> ACK_DETECT");
    ev_bit(1'b0);
    check(state == SNIFF_DATA, "ACK -> SNIFF_DATA");
    ev_byte(8'hC3);
    check(state == ACK_DETECT && count == 1 && data[0] == 8'hC3, "byte stored, counter incremented");
    // Repeated-Start: a new address phase, the frame's capture restarts
    ev_bit(1'b0);
    ev_bit(1'b1);
    ev_start();
    check(state == READ_ADDR && count == 0 && bit_index == 1, "Repeated-Start -> READ_ADDR");
    body(7'h33, 1'b1, db, 2, -1);   // body() issues its own Start: a second Repeated-Start
    check(state == BUSY && busy, "read NACK -> BUSY");
    // a Start while BUSY is a Repeated-Start too
    ev_start();
    check(state == READ_ADDR, "BUSY + Start -> READ_ADDR");
    ev_stop();
    check(state == DONE && count == 0, "Stop in READ_ADDR -> DONE");
    // DONE holds its result until the operator resets
    ev_start();
    check(state == DONE, "DONE ignores a Start");
    do_op_reset();
    check(state == IDLE, "operator reset -> IDLE");
    // ACK_ERROR holds until the operator resets
    body(7'h10, 1'b0, db, 1, 1);
    check(state == ACK_ERROR && err, "write NACK -> ACK_ERROR");
    ev_bit(1'b0); ev_stop();
    ev_start();
    check(state == ACK_ERROR && err, "ACK_ERROR ignores Stop and Start");
    do_op_reset();
    // operator reset in the middle of a frame
    ev_start();
    ev_bit(1'b1);
    do_op_reset();
    check(state == IDLE && address == 0 && bit_index == 0, "operator reset mid-frame");

    // random frames
    for (int t = 0; t < 300; t++) begin
      logic [6:0] a;
      logic       d;
      int         n, nk;
      a = 7'($urandom);
      d = 1'($urandom);
      n = int'($urandom_range(d ? 1 : 0, 4));
      nk = -1;
      if ($urandom_range(0, 3) == 0) begin
        nk = int'($urandom_range(0, d ? 0 : n));
        if (!d) n = nk;
      end
      if (d && nk == 0) n = 0;
      for (int k = 0; k < 4; k++) db[k] = 8'($urandom);
      full_frame(a, d, db, n, nk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
