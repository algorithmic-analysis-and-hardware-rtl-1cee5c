// Bus condition detector of the TWI analyser.
//
// The analyser never drives the bus; it oversamples SCL and SDA with its own
// system clock. Each line passes through a SYNC_STAGES flip-flop
// synchroniser, and the last two samples of both lines are compared:
//   * start_o : SDA went 1 -> 0 while SCL stayed high (Start or Repeated-Start)
//   * stop_o  : SDA went 0 -> 1 while SCL stayed high (Stop)
//   * bit_o   : SCL went 0 -> 1; sda_o then holds the bit on the line
// All three are single-cycle pulses, SYNC_STAGES + 1 clock cycles after the
// line change at the pins. The electrical rules (data stable while SCL is
// high, Start/Stop as SDA edges during SCL high) follow the TWI protocol as
// the document states it; sampling with a synchroniser, the absence of a
// spike filter and the reset value 1 (idle, pulled-up bus) are this design's
// choices. The system clock must give at least two samples per SCL high and
// low phase. SYNC_STAGES must be at least 2.
module twi_condition_detector #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scl_i,
  input  logic sda_i,
  output logic start_o,
  output logic stop_o,
  output logic bit_o,
  output logic sda_o
);

  logic [SYNC_STAGES-1:0] scl_sync, sda_sync;
  logic                   scl_q, sda_q;     // previous synchronised sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= '1;
      sda_sync <= '1;
      scl_q    <= 1'b1;
      sda_q    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[SYNC_STAGES-2:0], scl_i};
      sda_sync <= {sda_sync[SYNC_STAGES-2:0], sda_i};
      scl_q    <= scl_sync[SYNC_STAGES-1];
      sda_q    <= sda_sync[SYNC_STAGES-1];
    end
  end

  logic scl_s, sda_s;
  assign scl_s = scl_sync[SYNC_STAGES-1];
  assign sda_s = sda_sync[SYNC_STAGES-1];

  always_comb begin
    start_o = scl_q && scl_s &&  sda_q && !sda_s;
    stop_o  = scl_q && scl_s && !sda_q &&  sda_s;
    bit_o   = !scl_q && scl_s;
    sda_o   = sda_s;
  end

endmodule
