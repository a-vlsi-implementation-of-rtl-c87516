// ecc_arith_unit: arithmetic unit of the dual-field ECC processor.
//
// Holds the four point-operation datapaths: mixed addition and doubling over
// GF(2^M) (Karatsuba multipliers, XOR adders) and over GF(p) (Vedic modular
// multipliers, modular adders). Each datapath computes one whole point
// operation combinationally; prime and dbl select which result is returned.
// The result is valid one propagation delay after the operands and is
// captured by the register file on the next clock edge.
module ecc_arith_unit #(
  parameter int unsigned M = 8
) (
  input  logic         prime,   // 1: GF(p) result, 0: GF(2^M) result
  input  logic         dbl,     // 1: doubling, 0: mixed addition
  input  logic [M-1:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly,
  input  logic [M-1:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p,
  output logic [M-1:0] rx, ry, rz
);
  logic [M-1:0] ba_x, ba_y, ba_z, bd_x, bd_y, bd_z;
  logic [M-1:0] pa_x, pa_y, pa_z, pd_x, pd_y, pd_z;

  bf_point_add #(.M(M)) u_bf_add (
    .qx(bf_qx), .qy(bf_qy), .qz(bf_qz), .px(bf_px), .py(bf_py),
    .ca(bf_ca), .poly(bf_poly), .rx(ba_x), .ry(ba_y), .rz(ba_z));
  bf_point_dbl #(.M(M)) u_bf_dbl (
    .qx(bf_qx), .qy(bf_qy), .qz(bf_qz), .ca(bf_ca), .cb(bf_cb),
    .poly(bf_poly), .rx(bd_x), .ry(bd_y), .rz(bd_z));
  pf_point_add #(.M(M)) u_pf_add (
    .qx(pf_qx), .qy(pf_qy), .qz(pf_qz), .px(pf_px), .py(pf_py),
    .p(pf_p), .rx(pa_x), .ry(pa_y), .rz(pa_z));
  pf_point_dbl #(.M(M)) u_pf_dbl (
    .qx(pf_qx), .qy(pf_qy), .qz(pf_qz), .ca(pf_ca),
    .p(pf_p), .rx(pd_x), .ry(pd_y), .rz(pd_z));

  always_comb begin
    unique case ({prime, dbl})
      2'b00: {rx, ry, rz} = {ba_x, ba_y, ba_z};
      2'b01: {rx, ry, rz} = {bd_x, bd_y, bd_z};
      2'b10: {rx, ry, rz} = {pa_x, pa_y, pa_z};
      default: {rx, ry, rz} = {pd_x, pd_y, pd_z};
    endcase
  end
endmodule
