// ecc_data_select: prime/binary (P/B) data selector.
//
// Steers the operands to the side of the arithmetic unit that the current
// operation uses. The selected side receives P, Q, the curve coefficients and
// the modulus (prime p or field polynomial); the other side is held at zero so
// that its datapath does not toggle. The Q operand comes from the input buffer
// for a single point operation and from the register-file accumulator while a
// scalar multiplication runs (use_acc). Purely combinational.
module ecc_data_select #(
  parameter int unsigned M = 8
) (
  input  logic         prime,       // 1: GF(p), 0: GF(2^M)
  input  logic         use_acc,     // take Q from the accumulator
  input  logic [M-1:0] buf_qx, buf_qy, buf_qz,
  input  logic [M-1:0] acc_qx, acc_qy, acc_qz,
  input  logic [M-1:0] px, py, ca, cb, modulus,
  // binary-field side
  output logic [M-1:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly,
  // prime-field side
  output logic [M-1:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p
);
  logic [M-1:0] qx, qy, qz;

  always_comb begin
    {qx, qy, qz} = use_acc ? {acc_qx, acc_qy, acc_qz} : {buf_qx, buf_qy, buf_qz};
    {bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly} = '0;
    {pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p} = '0;
    if (prime) {pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p} = {qx, qy, qz, px, py, ca, modulus};
    else {bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly} = {qx, qy, qz, px, py, ca, cb, modulus};
  end
endmodule
