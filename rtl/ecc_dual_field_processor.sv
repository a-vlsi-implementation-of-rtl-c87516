// ecc_dual_field_processor: dual-field (GF(p) / GF(2^m)) elliptic-curve
// processor, top level.
//
// The host writes curve parameters and operands into the input buffer over a
// simple word bus, then writes an operation code to the control register
// (address 15). The main control unit decodes it, the P/B data selector steers
// the operands to the prime or binary side of the arithmetic unit, and the
// result goes through the register file into the result memory, from which
// the host reads it through the output buffer. Point addition and doubling
// take one arithmetic cycle; a scalar multiplication is run by the ladder
// unit, which reuses the doubling and addition datapaths for 2M cycles.
//
// Interface:
//   wr_en/wr_addr/wr_data  write one M-bit word (ecc_pkg A_* addresses);
//                          ignored while busy
//   rd_en/rd_addr          read a result-memory word (ecc_pkg M_* addresses);
//                          rd_data is valid with rd_valid one cycle later
//   busy, done             busy while an operation runs; done pulses once at
//                          its end (3 cycles after the control write for a
//                          point operation, 2M+5 for a scalar multiplication)
// Results are projective: binary-field points as (X, Y, Z) with x = X/Z,
// y = Y/Z^2; prime-field points with x = X/Z^2, y = Y/Z^3. Z = 0 is the point
// at infinity. Conversion back to affine coordinates is left to the host.
module ecc_dual_field_processor
  import ecc_pkg::*;
#(
  parameter int unsigned M = ECC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [3:0]   wr_addr,
  input  logic [M-1:0] wr_data,
  input  logic         rd_en,
  input  logic [3:0]   rd_addr,
  output logic [M-1:0] rd_data,
  output logic         rd_valid,
  output logic         busy,
  output logic         done
);
  // input buffer
  logic [M-1:0] px, py, qx, qy, qz, ca, cb, modulus, k;
  // control
  ecc_op_e op;
  logic prime, c_dbl, lad_start, rf_we, mem_we, mem_src_acc;
  logic [3:0] mem_base;
  // ladder
  logic lad_busy, lad_done, lad_dbl, lad_we;
  logic [M-1:0] lad_wx, lad_wy, lad_wz;
  // register file
  logic [M-1:0] res_x, res_y, res_z, acc_x, acc_y, acc_z;
  // data selector / arithmetic unit
  logic [M-1:0] bf_qx, bf_qy, bf_qz, bf_px, bf_py, bf_ca, bf_cb, bf_poly;
  logic [M-1:0] pf_qx, pf_qy, pf_qz, pf_px, pf_py, pf_ca, pf_p;
  logic [M-1:0] r_x, r_y, r_z;
  // memory
  logic [3:0]   mem_raddr;
  logic [M-1:0] mem_rdata;

  ecc_in_buffer #(.M(M)) u_in_buf (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .lock(busy),
    .px, .py, .qx, .qy, .qz, .ca, .cb, .modulus, .k);

  ecc_main_ctrl u_ctrl (
    .clk, .rst_n,
    .ctrl_we(wr_en && wr_addr == A_CTRL), .ctrl_wdata(wr_data[2:0]),
    .lad_done, .op, .prime, .dbl(c_dbl), .busy, .done, .lad_start,
    .rf_we, .mem_we, .mem_base, .mem_src_acc);

  ecc_data_select #(.M(M)) u_sel (
    .prime, .use_acc(lad_busy),
    .buf_qx(qx), .buf_qy(qy), .buf_qz(qz),
    .acc_qx(acc_x), .acc_qy(acc_y), .acc_qz(acc_z),
    .px, .py, .ca, .cb, .modulus,
    .bf_qx, .bf_qy, .bf_qz, .bf_px, .bf_py, .bf_ca, .bf_cb, .bf_poly,
    .pf_qx, .pf_qy, .pf_qz, .pf_px, .pf_py, .pf_ca, .pf_p);

  ecc_arith_unit #(.M(M)) u_arith (
    .prime, .dbl(lad_busy ? lad_dbl : c_dbl),
    .bf_qx, .bf_qy, .bf_qz, .bf_px, .bf_py, .bf_ca, .bf_cb, .bf_poly,
    .pf_qx, .pf_qy, .pf_qz, .pf_px, .pf_py, .pf_ca, .pf_p,
    .rx(r_x), .ry(r_y), .rz(r_z));

  ecc_scalar_ladder #(.M(M)) u_ladder (
    .clk, .rst_n, .start(lad_start), .k, .px, .py,
    .acc_x, .acc_y, .acc_z, .r_x, .r_y, .r_z,
    .busy(lad_busy), .done(lad_done), .dbl(lad_dbl),
    .we(lad_we), .wx(lad_wx), .wy(lad_wy), .wz(lad_wz));

  ecc_regfile #(.M(M)) u_rf (
    .clk, .rst_n,
    .we(lad_busy ? lad_we : rf_we),
    .wsel(lad_busy ? RF_ACC : RF_RES),
    .wx(lad_busy ? lad_wx : r_x),
    .wy(lad_busy ? lad_wy : r_y),
    .wz(lad_busy ? lad_wz : r_z),
    .res_x, .res_y, .res_z, .acc_x, .acc_y, .acc_z);

  ecc_result_mem #(.M(M)) u_mem (
    .clk, .rst_n, .we(mem_we), .wbase(mem_base),
    .wx(mem_src_acc ? acc_x : res_x),
    .wy(mem_src_acc ? acc_y : res_y),
    .wz(mem_src_acc ? acc_z : res_z),
    .wtag(op), .raddr(mem_raddr), .rdata(mem_rdata));

  ecc_out_buffer #(.M(M)) u_out_buf (
    .clk, .rst_n, .rd_en, .rd_addr, .mem_raddr, .mem_rdata, .rd_data, .rd_valid);

  // The ladder only runs while the controller waits for it.
  a_ladder_in_op: assert property (@(posedge clk) lad_busy |-> busy);
endmodule
