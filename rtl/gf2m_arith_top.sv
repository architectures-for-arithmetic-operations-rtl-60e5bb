// gf2m_arith_top -- the GF(2^m) arithmetic units side by side.
//
// The units do not form one datapath; each keeps its own ports, prefixed by
// the unit's name, and they share only the clock and the active-low reset:
//   dec_*   RS(7,3) decoder over GF(8): systolic syndrome array, key-equation
//           solver and error calculation (two errors corrected per word)
//   enc_*   systolic Cauchy-matrix encoder for the systematic RS(7,3) code
//   div_*   Gauss-Jordan systolic inverter/divider in the standard basis
//   mom_*   bit-serial modified Massey-Omura multiplier, normal basis GF(16)
//   mpm_*   parallel modified Massey-Omura multiplier, normal basis GF(16)
//   sis_*   serial-in serial-out systolic multiplier, standard basis GF(16)
//   pip_*   parallel-in parallel-out systolic multiplier, standard basis GF(16)
//   cm_*    shift register that multiplies its content by alpha, GF(16)
//   fir_*   FIR filter that multiplies a GF(8) polynomial by a fixed h(x)
//   pd_*    feedback shift register that divides a GF(8) polynomial by g(x)
//   le_*    systematic RS(7,3) encoder built on that divider
//   be_*    the same encoder at bit level (fixed XOR networks), RS(7,3) only
//   ple_*   the same encoder with a pipelined feedback path, two codewords
//           interleaved 2:1
//   tim_*   two-input GF(2) polynomial multiplier a1 h + a2 k
//   add_*   GF(16) adder on shift registers, serial (add_s_*) and parallel
//           (add_p_*) forms sharing the operand inputs
// The timing of each group is that of the unit; see the unit's file. The
// field sizes are the thesis's examples: GF(8) for the codecs, the divider
// and the polynomial circuits, GF(16) for the multipliers. The LFSR encoder
// uses the decoder's generator polynomial, so le_out_sym can be fed to
// dec_in_sym outside the top; the Cauchy encoder's code (roots alpha^0 ..
// alpha^3) is a different one.
module gf2m_arith_top
  import gf_pkg::*;
#(
  parameter int unsigned RS_N  = 7,
  parameter int unsigned RS_K  = 3,
  parameter int unsigned RS_T  = (RS_N - RS_K) / 2,
  parameter int unsigned DIV_M = 3,
  parameter int unsigned MOM_M = 4,
  parameter int unsigned SIS_M = 4,
  parameter int unsigned PIP_M = 4,
  parameter int unsigned ADD_M = 4,
  localparam int unsigned CM_M = 4,   // fixed: POLY of the unit is for GF(16)
  localparam int unsigned PD_R = 4    // fixed: degree of the unit's g(x)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Reed-Solomon decoder
  input  logic                    dec_in_valid,
  output logic                    dec_in_ready,
  input  gf_t                     dec_in_sym,
  output logic                    dec_out_valid,
  output logic [$clog2(RS_N)-1:0] dec_out_pos,
  output gf_t                     dec_out_sym,
  output logic                    dec_out_done,
  output logic                    dec_out_uncorrectable,
  output kes_act_e                dec_kes_act [2 * (RS_T + 1)],
  // Cauchy encoder
  input  logic                    enc_start,
  input  gf_t                     enc_m_in,
  output logic                    enc_out_valid,
  output gf_t                     enc_out_sym,
  output logic                    enc_out_t,
  // Gauss-Jordan divider
  input  logic                    div_in_valid,
  output logic                    div_in_ready,
  input  logic [DIV_M-1:0]        div_a,
  input  logic [DIV_M-1:0]        div_b,
  input  logic [DIV_M:0]          div_g,
  output logic                    div_out_valid,
  output logic [DIV_M-1:0]        div_c,
  // Massey-Omura serial multiplier
  input  logic                    mom_in_valid,
  output logic                    mom_in_ready,
  input  logic                    mom_b_in,
  input  logic                    mom_c_in,
  output logic                    mom_out_valid,
  output logic                    mom_d_out,
  // serial-in serial-out systolic multiplier
  input  logic                    sis_start,
  input  logic                    sis_a_in,
  input  logic                    sis_g_in,
  input  logic [SIS_M-1:0]        sis_b,
  output logic                    sis_out_valid,
  output logic                    sis_out_first,
  output logic                    sis_p_out,
  // parallel-in parallel-out systolic multiplier
  input  logic                    pip_in_valid,
  input  logic [PIP_M-1:0]        pip_a,
  input  logic [PIP_M-1:0]        pip_b,
  input  logic [PIP_M-1:0]        pip_g,
  output logic                    pip_out_valid,
  output logic [PIP_M-1:0]        pip_p,
  // constant multiplier
  input  logic                    cm_load,
  input  logic [CM_M-1:0]         cm_beta,
  input  logic                    cm_step,
  output logic [CM_M-1:0]         cm_q,
  // FIR polynomial multiplier
  input  logic                    fir_clear,
  input  logic                    fir_in_valid,
  input  gf_t                     fir_in_sym,
  output gf_t                     fir_out_sym,
  // LFSR polynomial divider
  input  logic                    pd_clear,
  input  logic                    pd_in_valid,
  input  gf_t                     pd_in_sym,
  output gf_t                     pd_q_sym,
  output gf_t                     pd_rem [PD_R],
  // LFSR RS encoder
  input  logic                    le_in_valid,
  output logic                    le_in_ready,
  input  gf_t                     le_in_sym,
  output logic                    le_out_valid,
  output gf_t                     le_out_sym,
  output logic                    le_out_parity,
  // pipelined LFSR RS encoder
  input  logic                    ple_in_valid,
  output logic                    ple_in_ready,
  input  gf_t                     ple_in_sym,
  output logic                    ple_out_valid,
  output gf_t                     ple_out_sym,
  output logic                    ple_out_parity,
  // two-input multiplier
  input  logic                    tim_clear,
  input  logic                    tim_in_valid,
  input  logic                    tim_a1_in,
  input  logic                    tim_a2_in,
  output logic                    tim_out_b,
  // adders
  input  logic                    add_load,
  input  logic [ADD_M-1:0]        add_a,
  input  logic [ADD_M-1:0]        add_b,
  input  logic                    add_start,
  output logic                    add_s_busy,
  output logic                    add_s_done,
  output logic [ADD_M-1:0]        add_s_sum,
  output logic                    add_p_busy,
  output logic                    add_p_done,
  output logic [ADD_M-1:0]        add_p_sum,
  // parallel Massey-Omura multiplier
  input  logic                    mpm_in_valid,
  input  logic [MOM_M-1:0]        mpm_b,
  input  logic [MOM_M-1:0]        mpm_c,
  output logic                    mpm_out_valid,
  output logic [MOM_M-1:0]        mpm_d,
  // bit-level RS(7,3) encoder
  input  logic                    be_in_valid,
  output logic                    be_in_ready,
  input  gf_t                     be_in_sym,
  output logic                    be_out_valid,
  output gf_t                     be_out_sym,
  output logic                    be_out_parity
);
  rs_decoder #(.N(RS_N), .T(RS_T)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_sym(dec_in_sym),
    .out_valid(dec_out_valid), .out_pos(dec_out_pos), .out_sym(dec_out_sym),
    .out_done(dec_out_done), .out_uncorrectable(dec_out_uncorrectable),
    .kes_act(dec_kes_act));

  cauchy_encoder #(.N(RS_N), .K(RS_K), .A_EXP(1)) u_enc (
    .clk, .rst_n, .start(enc_start), .m_in(enc_m_in),
    .out_valid(enc_out_valid), .out_sym(enc_out_sym), .out_t(enc_out_t));

  gj_divider #(.M(DIV_M)) u_div (
    .clk, .rst_n, .in_valid(div_in_valid), .in_ready(div_in_ready),
    .a(div_a), .b(div_b), .g(div_g), .out_valid(div_out_valid), .c(div_c));

  mom_serial_mult #(.M(MOM_M)) u_mom (
    .clk, .rst_n, .in_valid(mom_in_valid), .in_ready(mom_in_ready),
    .b_in(mom_b_in), .c_in(mom_c_in), .out_valid(mom_out_valid), .d_out(mom_d_out));

  sisos_mult #(.M(SIS_M)) u_sis (
    .clk, .rst_n, .start(sis_start), .a_in(sis_a_in), .g_in(sis_g_in), .b(sis_b),
    .out_valid(sis_out_valid), .out_first(sis_out_first), .p_out(sis_p_out));

  pipos_mult #(.M(PIP_M)) u_pip (
    .clk, .rst_n, .in_valid(pip_in_valid), .a(pip_a), .b(pip_b), .g(pip_g),
    .out_valid(pip_out_valid), .p(pip_p));
  lfsr_const_mult #(.M(CM_M)) u_cm (
    .clk, .rst_n, .load(cm_load), .beta(cm_beta), .step(cm_step), .q(cm_q)
  );
  fir_poly_mult u_fir (
    .clk, .rst_n, .clear(fir_clear), .in_valid(fir_in_valid), .in_sym(fir_in_sym),
    .out_sym(fir_out_sym)
  );
  poly_divider #(.R(PD_R)) u_pd (
    .clk, .rst_n, .clear(pd_clear), .in_valid(pd_in_valid), .in_sym(pd_in_sym),
    .q_sym(pd_q_sym), .rem(pd_rem)
  );
  lfsr_rs_encoder #(.N(RS_N), .K(RS_K)) u_le (
    .clk, .rst_n, .in_valid(le_in_valid), .in_ready(le_in_ready), .in_sym(le_in_sym),
    .out_valid(le_out_valid), .out_sym(le_out_sym), .out_parity(le_out_parity)
  );
  pipelined_lfsr_encoder #(.N(RS_N), .K(RS_K)) u_ple (
    .clk, .rst_n, .in_valid(ple_in_valid), .in_ready(ple_in_ready), .in_sym(ple_in_sym),
    .out_valid(ple_out_valid), .out_sym(ple_out_sym), .out_parity(ple_out_parity)
  );
  two_input_mult u_tim (
    .clk, .rst_n, .clear(tim_clear), .in_valid(tim_in_valid), .a1_in(tim_a1_in),
    .a2_in(tim_a2_in), .out_b(tim_out_b)
  );
  gf_adder #(.M(ADD_M), .SERIAL(1'b1)) u_add_s (
    .clk, .rst_n, .load(add_load), .a(add_a), .b(add_b), .start(add_start),
    .busy(add_s_busy), .done(add_s_done), .sum(add_s_sum)
  );
  gf_adder #(.M(ADD_M), .SERIAL(1'b0)) u_add_p (
    .clk, .rst_n, .load(add_load), .a(add_a), .b(add_b), .start(add_start),
    .busy(add_p_busy), .done(add_p_done), .sum(add_p_sum)
  );
  mom_parallel_mult #(.M(MOM_M)) u_mpm (
    .clk, .rst_n, .in_valid(mpm_in_valid), .b(mpm_b), .c(mpm_c),
    .out_valid(mpm_out_valid), .d(mpm_d)
  );
  rs73_binary_encoder u_be (
    .clk, .rst_n, .in_valid(be_in_valid), .in_ready(be_in_ready), .in_sym(be_in_sym),
    .out_valid(be_out_valid), .out_sym(be_out_sym), .out_parity(be_out_parity)
  );
endmodule
