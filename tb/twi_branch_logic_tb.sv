// Self-checking testbench of twi_branch_logic.
//
// Exhaustive: every direction, acknowledge level and byte count 0..3 with the
// default capacity of two bytes. The expected exit state is written out row
// by row as a table (below), not computed with the block's expressions:
//   address ACK slot (count 0): ACK -> SNIFF_DATA, NACK -> ACK_ERROR
//   data slot, write: ACK -> SNIFF_DATA or BUSY when full, NACK -> ACK_ERROR
//   data slot, read : ACK -> SNIFF_DATA or BUSY when full, NACK -> BUSY
// The three prediction outputs are checked against the branch table:
// write/0 Stop or next byte, write/1 error, read/0 next byte, read/1 Stop.
// With master_code_i set, a NACK in the address slot leads to BUSY.
module twi_branch_logic_tb;
  import twi_pkg::*;

  logic       dir, ack, mc;
  logic [1:0] cnt;
  logic       stop_e, next_b, err;
  state_t     target;
  int checks = 0, failures = 0;

  twi_branch_logic #(.MAX_BYTES(2)) dut (
    .dir_i(dir), .ack_i(ack), .byte_count_i(cnt), .master_code_i(mc),
    .stop_expected_o(stop_e), .next_byte_o(next_b), .error_o(err),
    .target_o(target));

  function automatic state_t expected_target(logic d, logic a, int c, logic m);
    if (c == 0 && a && m) return BUSY;             // NACK of an Hs master code
    case ({d, a})
      2'b00: return (c >= 2) ? BUSY : SNIFF_DATA;   // write, ACK
      2'b01: return ACK_ERROR;                      // write, NACK
      2'b10: return (c >= 2) ? BUSY : SNIFF_DATA;   // read, ACK
      default: return (c == 0) ? ACK_ERROR : BUSY;  // read, NACK
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s dir=%0b ack=%0b cnt=%0d", what, dir, ack, cnt);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < 2; d++)
        for (int a = 0; a < 2; a++) begin
          dir = 1'(d); ack = 1'(a); cnt = 2'(c); mc = 1'(m);
          #1;
          check(target == expected_target(dir, ack, c, mc), "exit state");
          check(stop_e == ((d == 0 && a == 0) || (d == 1 && a == 1)), "stop prediction");
          check(next_b == (a == 0), "next byte prediction");
          check(err == (expected_target(dir, ack, c, mc) == ACK_ERROR), "error");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
