// k2_top - K2 stream cipher keystream generator, 64 keystream bits per clock.
//
// K2 has two word-oriented feedback shift registers, FSR-A (5 x 32 bit) and FSR-B
// (11 x 32 bit), a dynamic feedback controller that chooses FSR-B's feedback
// multipliers from two bits of FSR-A, and a nonlinear function with four 32-bit
// registers (R1, R2, L1, L2) built from adders and AES-like Sub steps. Every clock the
// nonlinear function yields z^H (upper 32 bits) and z^L (lower 32 bits).
// Set-up, all on the one shared datapath: the key schedule expands the 128-bit key to
// K0..K11; the state is loaded as A_m = K_{4-m}; B = (K10, K11, IV0, IV1, K8, K9, IV2,
// IV3, K7, K5, K6) for stages 0..10; R/L = 0; then 24 clocks with z^L fed into FSR-A
// and z^H into FSR-B. After that each clock gives one 64-bit keystream word.
// NLF_IMPL picks the nonlinear-function micro-architecture (all compute the same
// keystream): 1 = direct form, 2 = L0/R0 pipeline registers with operand selectors,
// 3 = parallel adder/register pairs with output selectors (default, the fastest
// variant of the source design).
// Interface: start (one clock) with key/iv valid in that clock; busy during set-up;
// keystream_valid/keystream_ready handshake in RUN (word taken when both are high;
// with ready low the cipher stalls). key = {IK0,IK1,IK2,IK3}, iv = {IV0,..,IV3},
// keystream = {z^H, z^L}. The first keystream word comes 37 clocks after start.
module k2_top
  import k2_pkg::*;
#(
  parameter int unsigned NLF_IMPL = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  output logic         busy,
  output logic         keystream_valid,
  input  logic         keystream_ready,
  output logic [63:0]  keystream
);

  logic         key_start, key_done;
  logic         sched_start, doing, init_mode;
  word_t [11:0] ek;
  logic [127:0] iv_q;
  word_t [4:0]  a, a_load;
  word_t [10:0] b, b_load;
  word_t        term0, term8, zh, zl;
  nlf_taps_t    taps;

  // The IV is held from start until the state is loaded.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     iv_q <= '0;
    else if (start) iv_q <= iv;
  end

  k2_ctrl u_ctrl (
    .clk, .rst_n, .start, .key_done, .ready(keystream_ready),
    .key_start, .sched_start, .doing, .init_mode, .valid(keystream_valid), .busy
  );

  k2_keysched u_keysched (
    .clk, .rst_n, .start(key_start), .key, .busy(), .done(key_done), .ek
  );

  // Initial state
  for (genvar m = 0; m < 5; m++) begin : g_a_load
    assign a_load[m] = ek[4 - m];
  end
  assign b_load = {ek[6], ek[5], ek[7], iv_q[31:0], iv_q[63:32], ek[9], ek[8],
                   iv_q[95:64], iv_q[127:96], ek[11], ek[10]};

  k2_fsr_a u_fsr_a (
    .clk, .rst_n, .load(sched_start), .load_val(a_load), .step(doing), .init_mode,
    .zl, .a
  );

  k2_dfc u_dfc (.a2(a[2]), .b0(b[0]), .b8(b[8]), .cl1(), .cl2(), .term0, .term8);

  k2_fsr_b u_fsr_b (
    .clk, .rst_n, .load(sched_start), .load_val(b_load), .step(doing), .init_mode,
    .zh, .term0, .term8, .b
  );

  assign taps = '{a0: a[0], a4: a[4], b0: b[0], b4: b[4], b5: b[5], b9: b[9], b10: b[10]};

  if (NLF_IMPL == 1) begin : g_nlf1
    k2_nlf_impl1 u_nlf (.clk, .rst_n, .clear(sched_start), .step(doing), .taps, .zh, .zl);
  end else if (NLF_IMPL == 2) begin : g_nlf2
    k2_nlf_impl2 u_nlf (.clk, .rst_n, .clear(sched_start), .step(doing), .taps, .zh, .zl,
                        .primed());
  end else begin : g_nlf3
    k2_nlf_impl3 u_nlf (.clk, .rst_n, .clear(sched_start), .step(doing), .taps, .zh, .zl,
                        .primed());
  end

  assign keystream = {zh, zl};

endmodule
