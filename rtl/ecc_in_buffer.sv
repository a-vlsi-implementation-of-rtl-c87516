// ecc_in_buffer: input buffer of the ECC processor.
//
// Before an operation the host writes the curve parameters and operands into
// this buffer over the I/O bus, one M-bit word per write (addresses in
// ecc_pkg): affine point P (px, py), projective point Q (qx, qy, qz), curve
// coefficients a and b, the modulus (the prime p, or the low M bits of the
// field polynomial f(x) = x^M + g(x)) and the scalar k. The words are held in
// registers and presented in parallel to the datapath. Writes are ignored
// while lock is high (an operation is running) so operands stay stable.
// Timing: a write on a rising edge is visible on the outputs after that edge.
// Reset clears every word.
module ecc_in_buffer
  import ecc_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [3:0]   wr_addr,
  input  logic [M-1:0] wr_data,
  input  logic         lock,
  output logic [M-1:0] px, py, qx, qy, qz, ca, cb, modulus, k
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {px, py, qx, qy, qz, ca, cb, modulus, k} <= '0;
    end else if (wr_en && !lock) begin
      case (wr_addr)
        A_PX:    px      <= wr_data;
        A_PY:    py      <= wr_data;
        A_QX:    qx      <= wr_data;
        A_QY:    qy      <= wr_data;
        A_QZ:    qz      <= wr_data;
        A_CA:    ca      <= wr_data;
        A_CB:    cb      <= wr_data;
        A_MOD:   modulus <= wr_data;
        A_K:     k       <= wr_data;
        default: ;
      endcase
    end
  end
endmodule
