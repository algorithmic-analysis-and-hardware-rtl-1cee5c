// Monitor state machine of the TWI analyser.
//
// Follows one TWI frame bit by bit from the events of the condition detector
// (start_i, stop_i, and bit_i with the sampled SDA level sda_i):
//   IDLE       waits for a Start.
//   READ_ADDR  stores 7 address bits, MSB first, into an 8-bit register whose
//              MSB stays 0; a down-counter gives the bit position.
//   READ_DIR   stores the direction bit and sets the READ or WRITE flag.
//   ACK_DETECT samples the acknowledge bit and leaves through the branch
//              logic (twi_branch_logic) to SNIFF_DATA, BUSY or ACK_ERROR.
//   SNIFF_DATA shifts 8 data bits into a temporary register; after the 8th
//              bit the byte is copied to its output slot, the data byte
//              counter is incremented and ACK_DETECT follows.
//              A High-Speed-mode master code (address 0000 1xx) is
//              NACKed by design and leads to BUSY, not to ACK_ERROR.
//   ACK_ERROR  holds the error flag until an operator reset.
//   BUSY       capacity (MAX_BYTES) reached, or the master ended a read with a
//              NACK: nothing more is captured, a Stop leads to DONE.
//   DONE       frame finished; held until an operator reset.
// A Start or Repeated-Start restarts at READ_ADDR and a Stop leads to DONE
// from any state that is following a frame. op_reset_i returns to IDLE and
// clears every register and flag. All of this is the document's state
// machine. This design's own choices: DONE and ACK_ERROR ignore bus events so
// that the captured result stays on the outputs until the operator resets;
// a Repeated-Start clears the address, data and counters of the frame; a
// data byte reaches data_o only once complete, so a byte cut short by a
// Stop or Repeated-Start leaves data_o unchanged.
//
// expect_stop_o / expect_byte_o hold the prediction of the last acknowledge
// slot: a Stop may follow, another data byte may follow.
//
// bit_index_o counts the bit slots of the frame, the Start being slot 1 and
// every SCL rising edge one more slot (the Stop or Repeated-Start slot
// included, as its SCL rising edge precedes the SDA edge). At DONE after n
// data bytes it equals 3 + 7 + 9n + 1 = 11 + 9n, whether or not all n bytes
// were captured.
//
// Timing: every state change and register update happens on the clock edge
// where the corresponding event pulse is high; outputs are registered.
//
// The assertions at the end use rst_n in their disable condition, which is
// why a linter may report rst_n as used both synchronously and
// asynchronously; the flip-flops themselves use it only as an asynchronous
// reset.
module twi_monitor_fsm
  import twi_pkg::*;
#(
  parameter int unsigned MAX_BYTES   = 2,
  parameter int unsigned BIT_INDEX_W = 16,
  localparam int unsigned CNT_W      = $clog2(MAX_BYTES + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       op_reset_i,
  input  logic                       start_i,
  input  logic                       stop_i,
  input  logic                       bit_i,
  input  logic                       sda_i,
  output state_t                     state_o,
  output logic [BYTE_BITS-1:0]       address_o,
  output logic                       dir_o,
  output logic                       read_flag_o,
  output logic                       write_flag_o,
  output logic [BYTE_BITS-1:0]       data_o [MAX_BYTES],
  output logic [CNT_W-1:0]           byte_count_o,
  output logic                       error_o,
  output logic                       busy_o,
  output logic                       done_o,
  output logic                       expect_stop_o,
  output logic                       expect_byte_o,
  output logic [BIT_INDEX_W-1:0]     bit_index_o
);

  state_t               state;
  logic [2:0]           bit_cnt;     // index of the next bit within a byte
  logic [BYTE_BITS-1:0] shift_q;     // temporary data register
  logic [BYTE_BITS-1:0] byte_full;   // temporary register with the bit now sampled
  state_t               ack_target;
  logic                 ack_error;
  logic                 ack_stop, ack_next;
  logic                 tracking;    // a frame is being followed

  twi_branch_logic #(.MAX_BYTES(MAX_BYTES)) u_branch (
    .dir_i          (dir_o),
    .ack_i          (sda_i),
    .byte_count_i   (byte_count_o),
    .master_code_i  (address_o[6:2] == 5'b00001),
    .stop_expected_o(ack_stop),
    .next_byte_o    (ack_next),
    .error_o        (ack_error),
    .target_o       (ack_target)
  );

  always_comb begin
    tracking = (state inside {READ_ADDR, READ_DIR, ACK_DETECT, SNIFF_DATA, BUSY});
    byte_full = shift_q;
    byte_full[bit_cnt] = sda_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      bit_cnt      <= '0;
      shift_q      <= '0;
      address_o    <= '0;
      dir_o        <= 1'b0;
      read_flag_o  <= 1'b0;
      write_flag_o <= 1'b0;
      data_o       <= '{default: '0};
      byte_count_o <= '0;
      error_o      <= 1'b0;
      bit_index_o  <= '0;
      expect_stop_o <= 1'b0;
      expect_byte_o <= 1'b0;
    end else if (op_reset_i) begin
      state        <= IDLE;
      bit_cnt      <= '0;
      shift_q      <= '0;
      address_o    <= '0;
      dir_o        <= 1'b0;
      read_flag_o  <= 1'b0;
      write_flag_o <= 1'b0;
      data_o       <= '{default: '0};
      byte_count_o <= '0;
      error_o      <= 1'b0;
      bit_index_o  <= '0;
      expect_stop_o <= 1'b0;
      expect_byte_o <= 1'b0;
    end else if (start_i && (tracking || state == IDLE)) begin
      state        <= READ_ADDR;
      bit_cnt      <= 3'(ADDR_BITS - 1);
      shift_q      <= '0;
      address_o    <= '0;
      dir_o        <= 1'b0;
      read_flag_o  <= 1'b0;
      write_flag_o <= 1'b0;
      data_o       <= '{default: '0};
      byte_count_o <= '0;
      bit_index_o  <= BIT_INDEX_W'(1);
      expect_stop_o <= 1'b0;
      expect_byte_o <= 1'b0;
    end else if (stop_i && tracking) begin
      state <= DONE;
    end else if (bit_i && tracking) begin
      if (bit_index_o != '1) bit_index_o <= bit_index_o + 1'b1;
      unique case (state)
        READ_ADDR: begin
          address_o[bit_cnt] <= sda_i;
          if (bit_cnt == '0) state <= READ_DIR;
          else               bit_cnt <= bit_cnt - 1'b1;
        end
        READ_DIR: begin
          dir_o        <= sda_i;
          read_flag_o  <= sda_i;
          write_flag_o <= !sda_i;
          state        <= ACK_DETECT;
        end
        ACK_DETECT: begin
          state   <= ack_target;
          error_o <= ack_error;
          expect_stop_o <= ack_stop;
          expect_byte_o <= ack_next;
          bit_cnt <= 3'(BYTE_BITS - 1);
        end
        SNIFF_DATA: begin
          shift_q <= byte_full;
          if (bit_cnt == '0) begin
            for (int unsigned i = 0; i < MAX_BYTES; i++)
              if (CNT_W'(i) == byte_count_o) data_o[i] <= byte_full;
            byte_count_o         <= byte_count_o + 1'b1;
            state                <= ACK_DETECT;
          end else begin
            bit_cnt <= bit_cnt - 1'b1;
          end
        end
        default: ;  // BUSY: bits are counted, nothing is captured
      endcase
    end
  end

  assign state_o = state;
  assign busy_o  = (state == BUSY);
  assign done_o  = (state == DONE);

  // Bus rules the detector guarantees and the capture relies on.
  a_no_start_and_stop: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_i && stop_i));
  a_no_start_and_bit: assert property (@(posedge clk) disable iff (!rst_n)
    !((start_i || stop_i) && bit_i));
  a_byte_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    byte_count_o <= CNT_W'(MAX_BYTES));

endmodule
