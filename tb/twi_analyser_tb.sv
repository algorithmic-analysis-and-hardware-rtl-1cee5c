// End-to-end testbench of the TWI analyser at its default parameters.
//
// A behavioural bus model plays complete frames on SCL/SDA; the analyser
// runs from a 50 MHz system clock. After each frame the testbench compares
// the analyser's outputs with the capture expected from the protocol rules
// (address, direction flags, the first two data bytes, error flag, final
// state, bit count 11 + 9n of equation (1)) and then issues the operator
// reset. Contents:
//   * the sample communication: address 126 with one and with two data
//     bytes of 255, in Standard, Fast, Fast-Plus and High-Speed timing
//   * a High-Speed-mode frame preceded by its NACKed master code
//   * a register-style write, Repeated-Start, read
//   * a frame longer than the capacity, a read ended by NACK, an address
//     NACK and a data NACK, clock stretching by the slave
//   * random frames
// The latency from the SDA edge of a Stop at the pin to done_o is checked to
// be SYNC_STAGES + 1 = 3 clock edges. Each mechanism is counted, and one that
// never occurred counts as a failure.
module twi_analyser_tb;
  import twi_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int MAXB = 2;

  logic clk = 1'b0, rst_n = 1'b0, op_reset = 1'b0;
  logic scl, sda;
  state_t      state;
  logic [7:0]  address;
  logic        dir, rflag, wflag, err, busy, done, exp_stop, exp_byte;
  logic [7:0]  data [MAXB];
  logic [1:0]  count;
  logic [15:0] bit_index;
  int checks = 0, failures = 0;

  // 50 MHz, rising edges at 13 ns + k * 20 ns: never on a bus edge
  initial begin
    #3ns;
    forever #10ns clk = ~clk;
  end

  twi_bus_model bus (.scl(scl), .sda(sda));

  twi_analyser dut (
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

  // ---- mechanism counters -------------------------------------------------
  int n_start = 0, n_rep_start = 0, n_stop = 0, n_write = 0, n_read = 0;
  int n_sniff = 0, n_busy_full = 0, n_busy_nack = 0, n_master_code = 0;
  int n_error = 0, n_done = 0, n_op_reset = 0, n_stretch = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  state_t prev_state = IDLE;

  always @(negedge clk) begin
    if (state != prev_state) begin
      if (state == READ_ADDR && prev_state == IDLE) n_start++;
      if (state == READ_ADDR && prev_state != IDLE) n_rep_start++;
      if (state == SNIFF_DATA && prev_state == ACK_DETECT) n_sniff++;
      if (state == BUSY && count == 2'(MAXB)) n_busy_full++;
      else if (state == BUSY && count == 0) n_master_code++;
      else if (state == BUSY) n_busy_nack++;
      if (state == ACK_ERROR) n_error++;
      if (state == DONE) n_done++;
      if (prev_state == READ_DIR) begin
        if (rflag) n_read++;
        if (wflag) n_write++;
      end
    end
    prev_state = state;
  end

  // ---- Stop-to-done latency ------------------------------------------------
  int  edges_since_stop = -1;
  int  n_latency = 0;
  always @(posedge sda) if (scl && rst_n) begin
    edges_since_stop = 0;
    n_stop++;
  end
  always @(posedge clk) if (edges_since_stop >= 0) edges_since_stop++;
  always @(negedge clk) if (edges_since_stop >= 0) begin
    if (err) edges_since_stop = -1;              // ACK_ERROR ignores the Stop
    else if (done) begin
      check(edges_since_stop == 3, "Stop to DONE latency");
      n_latency++;
      edges_since_stop = -1;
    end else if (edges_since_stop > 3) begin
      check(1'b0, "DONE late after Stop");
      edges_since_stop = -1;
    end
  end

  // ---- helpers --------------------------------------------------------------
  task automatic set_mode(input int m);
    case (m)
      0: begin bus.t_low_ns = 4700; bus.t_high_ns = 4000; end  // Standard, < 100 kHz
      1: begin bus.t_low_ns = 1300; bus.t_high_ns = 1200; end  // Fast, 400 kHz
      2: begin bus.t_low_ns = 500;  bus.t_high_ns = 500;  end  // Fast-Plus, 1 MHz
      default: begin bus.t_low_ns = 160; bus.t_high_ns = 60; end // High-Speed minimum phases
    endcase
    n_mode[m]++;
  endtask

  task automatic do_op_reset();
    @(negedge clk) op_reset = 1'b1;
    @(negedge clk) op_reset = 1'b0;
    n_op_reset++;
    check(state == IDLE && !err && count == 0 && bit_index == 0, "operator reset clears");
  endtask

  task automatic check_frame(input logic [6:0] a, input logic d, input logic [7:0] db [],
                             input int n, input int nack_at);
    int  cap;
    bit  error_exp, mcode;
    repeat (5) @(negedge clk);
    mcode = (a[6:2] == 5'b00001);
    error_exp = (nack_at == 0 && !mcode) || (!d && nack_at >= 1 && nack_at <= MAXB);
    cap = error_exp ? nack_at : ((n < MAXB) ? n : MAXB);
    check(address == {1'b0, a}, "address");
    check(dir == d && rflag == d && wflag == !d, "direction flags");
    check(int'(count) == cap, "byte count");
    for (int k = 0; k < cap; k++) check(data[k] == db[k], "data byte");
    check(err == error_exp, "error flag");
    if (error_exp) check(state == ACK_ERROR, "ends in ACK_ERROR");
    else begin
      check(state == DONE && done, "ends in DONE");
      check(int'(bit_index) == 11 + 9 * n, "bit count, equation (1)");
    end
  endtask

  task automatic run_frame(input logic [6:0] a, input logic d, input logic [7:0] db [],
                           input int n, input int nack_at = -1, input int unsigned stretch = 0);
    bus.frame(a, d, db, n, nack_at, 1'b1, stretch);
    if (stretch != 0) n_stretch++;
    check_frame(a, d, db, n, nack_at);
    do_op_reset();
  endtask

  logic [7:0] db [];

  initial begin
    db = new[4];
    #200ns;
    rst_n = 1'b1;
    #200ns;
    check(state == IDLE, "reset state");

    // sample communication, all four modes
    for (int m = 0; m < 4; m++) begin
      set_mode(m);
      db = '{8'd255, 8'd255, 8'd255, 8'd255};
      run_frame(7'd126, 1'b0, db, 1);
      check(address == 8'd0, "cleared after reset");
      run_frame(7'd126, 1'b0, db, 2);
      run_frame(7'd126, 1'b1, db, 2);
    end

    // High-Speed-mode frame: master code at Fast-mode speed, then Hs
    set_mode(1);
    db = '{8'h5A, 8'hA5, 8'h00, 8'h00};
    bus.frame(7'b0000101, 1'b1, db, 0, 0, 1'b0);
    repeat (5) @(negedge clk);
    check(state == BUSY && !err, "master code NACK waits for Repeated-Start");
    set_mode(3);
    bus.rep_start();
    bus.frame_after_sr(7'd126, 1'b0, db, 2);
    check_frame(7'd126, 1'b0, db, 2, -1);
    do_op_reset();

    // register-style access: write the register number, Repeated-Start, read
    set_mode(2);
    db = '{8'h10, 8'h00, 8'h00, 8'h00};
    bus.frame(7'h50, 1'b0, db, 1, -1, 1'b0);
    check(count == 1 && data[0] == 8'h10, "register number captured");
    bus.rep_start();
    db = '{8'hC0, 8'hFF, 8'hEE, 8'h00};
    bus.frame_after_sr(7'h50, 1'b1, db, 2);
    check_frame(7'h50, 1'b1, db, 2, -1);
    check(bit_index == 16'(11 + 18), "bit count restarts at the Repeated-Start");
    do_op_reset();

    // capacity, read NACK, errors, clock stretching
    db = '{8'h11, 8'h22, 8'h33, 8'h44};
    run_frame(7'h21, 1'b0, db, 4);
    run_frame(7'h21, 1'b1, db, 3);
    run_frame(7'h21, 1'b1, db, 1);
    run_frame(7'h22, 1'b0, db, 0, 0);
    run_frame(7'h22, 1'b1, db, 0, 0);
    run_frame(7'h23, 1'b0, db, 2, 2);
    run_frame(7'h24, 1'b0, db, 2, -1, 3000);
    set_mode(0);
    run_frame(7'h24, 1'b1, db, 2, -1, 20000);

    // random frames in random modes
    for (int t = 0; t < 40; t++) begin
      logic [6:0] a;
      logic       d;
      int         n, nk;
      set_mode(int'($urandom_range(1, 3)));
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
      run_frame(a, d, db, n, nk, ($urandom_range(0, 4) == 0) ? 1000 : 0);
    end

    // every mechanism must have happened
    check(n_start > 0,       "mechanism: Start");
    check(n_rep_start > 0,   "mechanism: Repeated-Start");
    check(n_stop > 0,        "mechanism: Stop");
    check(n_write > 0,       "mechanism: write frame");
    check(n_read > 0,        "mechanism: read frame");
    check(n_sniff > 0,       "mechanism: data capture");
    check(n_busy_full > 0,   "mechanism: BUSY, capacity reached");
    check(n_busy_nack > 0,   "mechanism: BUSY, read ended by NACK");
    check(n_master_code > 0, "mechanism: Hs master code");
    check(n_error > 0,       "mechanism: ACK_ERROR");
    check(n_done > 0,        "mechanism: DONE");
    check(n_op_reset > 0,    "mechanism: operator reset");
    check(n_latency > 0,     "Stop latency measured");
    check(n_stretch > 0,     "mechanism: clock stretching");
    foreach (n_mode[m]) check(n_mode[m] > 0, "mechanism: bus mode");
    $display("mechanisms: start=%0d rep_start=%0d stop=%0d write=%0d read=%0d capture=%0d busy_full=%0d busy_nack=%0d master_code=%0d error=%0d done=%0d op_reset=%0d stretch=%0d modes=%0d/%0d/%0d/%0d",
             n_start, n_rep_start, n_stop, n_write, n_read, n_sniff, n_busy_full, n_busy_nack,
             n_master_code, n_error, n_done, n_op_reset, n_stretch,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
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
