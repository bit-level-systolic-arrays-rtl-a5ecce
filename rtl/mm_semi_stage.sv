// mm_semi_stage: one iteration (Step 2) of the semi-systolic modular
// multiplier, three latched rows of n+3 single-bit cells.
//
//   row 1, X cells      (C,S) := 2C + 2S + A_k*B                 Step 2a
//   row 2, Y/Z cells    trial (C,S) - 2N, keep it if R says >= 0  Step 2b
//   row 3, U/W cells    trial (C,S) -  N, keep it if R says >= 0  Step 2c
//
// The five top positions (n-2 .. n+2) of rows 2 and 3 are Y/U cells that feed
// an L cell; the estimated sign R is broadcast within the same cycle to every
// cell of the row. B and M = -N pass down beside the data. Each row ends in a
// register, so the stage takes three cycles and accepts a new operand set
// every cycle.
//
// Interface: c_in/s_in and c_out/s_out are carry-save words aligned by weight
// (c_out[0] is always 0), in (n+3)-bit two's complement. b_in/m_in are B and
// M extended to n+3 bits. a must be valid in the cycle the stage's first row
// computes, the same cycle as b_in, m_in, c_in and s_in. Outputs appear three
// cycles later. Cell functions, row order and bit positions follow the
// published stage; the weight-aligned carry word at the stage boundary is a
// choice of this design.
module mm_semi_stage
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS = 8
) (
  input  logic                          clk,
  input  logic                          a,
  input  logic [cs_width(N_BITS)-1:0]   b_in,
  input  logic [cs_width(N_BITS)-1:0]   m_in,
  input  logic [cs_width(N_BITS)-1:0]   c_in,
  input  logic [cs_width(N_BITS)-1:0]   s_in,
  output logic [cs_width(N_BITS)-1:0]   b_out,
  output logic [cs_width(N_BITS)-1:0]   m_out,
  output logic [cs_width(N_BITS)-1:0]   c_out,
  output logic [cs_width(N_BITS)-1:0]   s_out
);
  localparam int unsigned W  = cs_width(N_BITS);
  localparam int unsigned LO = N_BITS - 2;   // lowest position seen by L

  // ---- row 1: X cells, Step 2a ---------------------------------------------
  logic [W-1:0] x_s_in, x_c_in, x_s, x_c;    // x_c[p] has weight p+1
  logic [W-1:0] r1_s, r1_c, r1_b, r1_m;

  assign x_s_in = {s_in[W-2:0], 1'b0};       // 2S
  assign x_c_in = {c_in[W-2:0], 1'b0};       // 2C

  for (genvar p = 0; p < W; p++) begin : g_x
    mm_cell_x u_x (
      .a(a), .b(b_in[p]), .s(x_s_in[p]), .c(x_c_in[p]),
      .s_out(x_s[p]), .c_out(x_c[p])
    );
  end

  always_ff @(posedge clk) begin
    r1_s <= x_s;
    r1_c <= {x_c[W-2:0], 1'b0};               // align carries by weight
    r1_b <= b_in;
    r1_m <= m_in;
  end

  // ---- row 2: Y/Z cells with -2N, Step 2b -----------------------------------
  logic [W-1:0] z_m, z_s, z_c, z_ch, z_sh;
  logic         r2;
  logic [W-1:0] r2_s, r2_c, r2_b, r2_m;

  assign z_m = {r1_m[W-2:0], 1'b0};           // M' = 2M = -2N

  for (genvar p = 0; p < W; p++) begin : g_yz
    if (p >= LO) begin : g_y
      mm_cell_y u_y (
        .m(z_m[p]), .s(r1_s[p]), .c(r1_c[p]), .r(r2),
        .c_hat(z_ch[p]), .s_hat(z_sh[p]), .s_out(z_s[p]), .c_out(z_c[p])
      );
    end else begin : g_z
      mm_cell_z u_z (
        .m(z_m[p]), .s(r1_s[p]), .c(r1_c[p]), .r(r2),
        .s_out(z_s[p]), .c_out(z_c[p])
      );
      assign z_ch[p] = 1'b0;                  // Z cells expose no trial bits
      assign z_sh[p] = 1'b0;
    end
  end

  mm_sign_est u_l2 (.c_hat(z_ch[LO+3:LO]), .s_hat(z_sh[LO+4:LO+1]), .r(r2));

  always_ff @(posedge clk) begin
    r2_s <= z_s;
    r2_c <= {z_c[W-2:0], 1'b0};
    r2_b <= r1_b;
    r2_m <= r1_m;
  end

  // ---- row 3: U/W cells with -N, Step 2c ------------------------------------
  logic [W-1:0] w_s, w_c, w_ch, w_sh;
  logic         r3;

  for (genvar p = 0; p < W; p++) begin : g_uw
    if (p >= LO) begin : g_u
      mm_cell_y u_u (
        .m(r2_m[p]), .s(r2_s[p]), .c(r2_c[p]), .r(r3),
        .c_hat(w_ch[p]), .s_hat(w_sh[p]), .s_out(w_s[p]), .c_out(w_c[p])
      );
    end else begin : g_w
      mm_cell_z u_w (
        .m(r2_m[p]), .s(r2_s[p]), .c(r2_c[p]), .r(r3),
        .s_out(w_s[p]), .c_out(w_c[p])
      );
      assign w_ch[p] = 1'b0;
      assign w_sh[p] = 1'b0;
    end
  end

  mm_sign_est u_l3 (.c_hat(w_ch[LO+3:LO]), .s_hat(w_sh[LO+4:LO+1]), .r(r3));

  always_ff @(posedge clk) begin
    s_out <= w_s;
    c_out <= {w_c[W-2:0], 1'b0};
    b_out <= r2_b;
    m_out <= r2_m;
  end
endmodule
