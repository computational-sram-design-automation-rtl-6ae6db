// instr_reg -- the flip-flop stage between the system bus and the wrapper's
// instruction decoder.
//
// The CPU's instruction word and its bus write data are captured here, and
// decoding starts on the next cycle from the registered copy, so the decoder
// and scheduler never see bus timing. It is a one-entry pipeline register
// with a valid/ready handshake on both sides: it accepts a new word when it
// is empty or when its current word leaves in the same cycle
// (in_ready = !out_valid || out_ready), so back-to-back instructions pass at
// one per cycle. The source description shows this flip-flop stage on the
// bus side of the wrapper; the handshake is this design's choice. Reset
// empties the register.
module instr_reg #(
  parameter int unsigned W = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end

endmodule
