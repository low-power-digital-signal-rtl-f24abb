// conv_encoder: rate 1/2, constraint length 7 convolutional encoder.
//
// The source design names a convolutional encoder for channel coding but gives
// no code; this block uses the widely used K = 7 code with generators
// G0 = 171 (octal) and G1 = 133 (octal). Each input bit u[n] produces the
// symbol {c0, c1}, where c0 (sym[1]) = parity(u[n..n-6] & G0) and
// c1 (sym[0]) = parity(u[n..n-6] & G1), taking the generator's most
// significant bit for u[n]. The encoder runs continuously across packets;
// its memory is cleared only by reset, and no tail bits are added.
//
// Timing: a valid/ready handshake on both sides with one output register.
// An input bit is taken on an edge where in_valid and in_ready are high; its
// symbol is offered on the next clock and held until out_ready. in_ready is
// high when the output register is empty or being emptied. sop is carried
// from input to output with the bit. Reset is asynchronous and active high.
module conv_encoder #(
  parameter logic [6:0] G0 = 7'o171,
  parameter logic [6:0] G1 = 7'o133
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  input  logic       in_sop,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [1:0] sym,
  output logic       sym_sop,
  output logic       sym_valid,
  input  logic       sym_ready
);

  logic [5:0] hist;  // hist[5] = previous bit, hist[0] = oldest
  logic [6:0] reg_n;

  assign in_ready = !sym_valid || sym_ready;
  assign reg_n    = {in_bit, hist};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hist      <= '0;
      sym       <= '0;
      sym_sop   <= 1'b0;
      sym_valid <= 1'b0;
    end else if (in_ready) begin
      sym_valid <= in_valid;
      if (in_valid) begin
        sym     <= {^(reg_n & G0), ^(reg_n & G1)};
        sym_sop <= in_sop;
        hist    <= {in_bit, hist[5:1]};
      end
    end
  end

endmodule
