// TWI (I2C) communication analyser, top level.
//
// A passive bus monitor: SCL and SDA are only read. The condition detector
// turns the oversampled lines into Start, Stop and bit events; the monitor
// state machine follows the frame and captures the slave address, the
// direction (READ / WRITE flags), up to MAX_BYTES data bytes and whether
// every slave acknowledge slot carried an ACK. The captured information is
// presented on plain output ports for a display; the kind of display is left
// to the board. Results are held in DONE or ACK_ERROR until op_reset_i.
//
// Interface: clk is the system clock (it must sample each SCL high and low
// phase at least twice), rst_n an asynchronous active-low reset, op_reset_i
// the operator's synchronous reset command. Outputs are registered and
// change SYNC_STAGES + 1 cycles after the bus event at the pins.
//
// The structure (detector, state machine with the branch table, two-byte
// capacity) follows the document; the event detection by oversampling and
// the exact port set are this design's choices.
module twi_analyser
  import twi_pkg::*;
#(
  parameter int unsigned MAX_BYTES   = 2,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned BIT_INDEX_W = 16,
  localparam int unsigned CNT_W      = $clog2(MAX_BYTES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   op_reset_i,
  input  logic                   scl_i,
  input  logic                   sda_i,
  output state_t                 state_o,
  output logic [BYTE_BITS-1:0]   address_o,
  output logic                   dir_o,
  output logic                   read_flag_o,
  output logic                   write_flag_o,
  output logic [BYTE_BITS-1:0]   data_o [MAX_BYTES],
  output logic [CNT_W-1:0]       byte_count_o,
  output logic                   error_o,
  output logic                   busy_o,
  output logic                   done_o,
  output logic                   expect_stop_o,
  output logic                   expect_byte_o,
  output logic [BIT_INDEX_W-1:0] bit_index_o
);

  logic start_ev, stop_ev, bit_ev, sda_bit;

  twi_condition_detector #(.SYNC_STAGES(SYNC_STAGES)) u_detect (
    .clk    (clk),
    .rst_n  (rst_n),
    .scl_i  (scl_i),
    .sda_i  (sda_i),
    .start_o(start_ev),
    .stop_o (stop_ev),
    .bit_o  (bit_ev),
    .sda_o  (sda_bit)
  );

  twi_monitor_fsm #(
    .MAX_BYTES  (MAX_BYTES),
    .BIT_INDEX_W(BIT_INDEX_W)
  ) u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .op_reset_i   (op_reset_i),
    .start_i      (start_ev),
    .stop_i       (stop_ev),
    .bit_i        (bit_ev),
    .sda_i        (sda_bit),
    .state_o      (state_o),
    .address_o    (address_o),
    .dir_o        (dir_o),
    .read_flag_o  (read_flag_o),
    .write_flag_o (write_flag_o),
    .data_o       (data_o),
    .byte_count_o (byte_count_o),
    .error_o      (error_o),
    .busy_o       (busy_o),
    .done_o       (done_o),
    .expect_stop_o(expect_stop_o),
    .expect_byte_o(expect_byte_o),
    .bit_index_o  (bit_index_o)
  );

endmodule
