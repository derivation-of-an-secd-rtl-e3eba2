// serial_if -- the SECD CPU's serial interface (character I/O).
//
// Two instructions.  s-in: out_char returns the character currently held
// from the input device, tagged as a character word, and the holding
// register is emptied (rx_full falls).  s-out: the low 8 bits of v0 (the j
// register) are sent to the output device; tx_valid is a one-cycle pulse
// with tx_data at the following clock.  The device side is a simple byte
// interface (rx_valid/rx_data in, tx_valid/tx_data out) where a UART would
// be attached; the holding register and strobes are this design's choice.
// s-in on an empty holding register returns the last character received.
module serial_if
  import secd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  ser_inst_e  inst,
  input  word_t      v0,
  output word_t      out_char,
  // device side
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       rx_full,
  output logic       tx_valid,
  output logic [7:0] tx_data
);
  logic [7:0] rx_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_hold  <= '0;
      rx_full  <= 1'b0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else begin
      tx_valid <= (inst == SER_OUT);
      if (inst == SER_OUT) tx_data <= v0[7:0];
      if (rx_valid) begin
        rx_hold <= rx_data;
        rx_full <= 1'b1;
      end else if (inst == SER_IN) begin
        rx_full <= 1'b0;
      end
    end
  end

  assign out_char = mk_char(rx_hold);
endmodule
