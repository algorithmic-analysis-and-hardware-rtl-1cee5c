// Boolean branch operation of the TWI analyser (exit conditions of ACK_DETECT).
//
// Purely combinational. From the stored direction (0 = write, 1 = read), the
// level of the acknowledge bit (0 = ACK, 1 = NACK) and the number of data
// bytes captured so far it predicts what the bus will carry next:
//   stop_expected_o = !dir & !ack | dir & ack   (write ACK, read NACK)
//   next_byte_o     = !ack                      (another data byte may follow)
//   error_o         = slave acknowledge slot carrying a NACK
//                     (not the NACK that follows a High-Speed-mode master code)
// and picks the exit state target_o:
//   error                  -> ACK_ERROR
//   read NACK              -> BUSY   (master ends the read, Stop expected)
//   byte_count_i >= MAX_BYTES -> BUSY (capacity reached, bus still tracked)
//   otherwise              -> SNIFF_DATA
// The truth table follows the document's branch table for data bytes. Two
// choices are this design's: the acknowledge after the address byte
// (byte_count_i == 0) always comes from the slave, so a NACK there is an
// error in both directions; and an error is reported even when the capacity
// is already reached; and a NACK after a High-Speed-mode master code
// (address bits 0000 1xx, master_code_i) is the normal protocol, no error:
// BUSY then waits for the Repeated-Start that begins the Hs-mode frame.
module twi_branch_logic
  import twi_pkg::*;
#(
  parameter int unsigned MAX_BYTES = 2,
  localparam int unsigned CNT_W    = $clog2(MAX_BYTES + 1)
) (
  input  logic             dir_i,
  input  logic             ack_i,
  input  logic [CNT_W-1:0] byte_count_i,
  input  logic             master_code_i,
  output logic             stop_expected_o,
  output logic             next_byte_o,
  output logic             error_o,
  output state_t           target_o
);

  logic addr_ack;   // the slot acknowledges the address byte
  logic full;

  always_comb begin
    addr_ack        = (byte_count_i == '0);
    full            = (byte_count_i >= CNT_W'(MAX_BYTES));
    stop_expected_o = (!dir_i && !ack_i) || (dir_i && ack_i);
    next_byte_o     = !ack_i;
    error_o         = ack_i && (addr_ack ? !master_code_i : !dir_i);
    if (error_o)     target_o = ACK_ERROR;
    else if (ack_i)  target_o = BUSY;
    else if (full)   target_o = BUSY;
    else             target_o = SNIFF_DATA;
  end

endmodule
