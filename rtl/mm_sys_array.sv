// mm_sys_array: bit-level systolic modular multiplier for an n-bit modulus.
//
// Same arithmetic as the semi-systolic array (3n rows: X, Y/Z, U/W for each
// bit of A), but with no broadcast. The n+3 bit positions of a row are
// grouped into w = ceil(n/2) nodes: one supercell for the five top positions
// (X^5, LY^5 or LU^5) and pairs of cells (X^2, Z^2, W^2) for the rest.
// Node (i, j), column i counted from the least significant end, row j from
// the top, computes at cycle
//     t(i, j) = 2j - i + w - 1.
// Every node latches its outputs. From this schedule:
//   * A (in X rows) and R (in Y/U rows) move one column east per cycle
//     through a register in every node, starting at the supercell;
//   * a value passed straight down to the same column waits two cycles
//     (the node's register plus one delay);
//   * a value passed down and one column west waits one cycle.
// Shift-by-one and shift-by-two arcs between rows (carries, doubling, 2N)
// all land in the same or the next column, so one register stage or two
// suffices everywhere. The first result leaves the array L = 6n + w - 2
// cycles after its operands entered, and a new operand set may enter every
// cycle.
//
// Interface: identical to mm_semi_array. Present A, B, M = -N (low n bits)
// with in_valid in one cycle; L cycles later out_valid is high with the
// weight-aligned carry-save pair c, s (n+3 bits, two's complement) and
// m_out. The operand bits are skewed on the way in and the result bits
// de-skewed on the way out by delay lines, so both ports are plain words.
// Requires 2^(n-1) <= N < 2^n and B < N. Only the valid flag is reset.
//
// The node grouping, the arcs and the schedule follow the published systolic
// array (the even-n case; for odd n the lone low column is this design's
// choice). Building the ports as aligned words, the valid flag and the M
// output are additions of this design.
module mm_sys_array
  import mm_pkg::*;
#(
  parameter int unsigned N_BITS = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [N_BITS-1:0]           a,
  input  logic [N_BITS-1:0]           b,
  input  logic [N_BITS-1:0]           m,
  output logic                        out_valid,
  output logic [cs_width(N_BITS)-1:0] c,
  output logic [cs_width(N_BITS)-1:0] s,
  output logic [N_BITS-1:0]           m_out
);
  localparam int unsigned W    = cs_width(N_BITS);
  localparam int unsigned COLS = sys_width(N_BITS);
  localparam int unsigned ROWS = 3 * N_BITS;
  localparam int unsigned LAT  = sys_latency(N_BITS);
  localparam int unsigned LO   = N_BITS - 2;

  // Per row: the node inputs, the node outputs, and the output registers.
  // *_q is the node's own output register, *_qq the extra delay used by arcs
  // that go straight down.
  logic [W-1:0] in_b  [ROWS];   // B entering the row
  logic [W-1:0] in_m  [ROWS];   // M entering the row (passed down)
  logic [W-1:0] in_mc [ROWS];   // M bit used by the cells (-2N or -N)
  logic [W-1:0] in_s  [ROWS];
  logic [W-1:0] in_c  [ROWS];   // in_c[p] has weight p
  logic [W-1:0] out_s [ROWS];
  logic [W-1:0] out_c [ROWS];   // out_c[p] has weight p+1
  logic [W-1:0] q_s  [ROWS], qq_s [ROWS];
  logic [W-1:0] q_c  [ROWS], qq_c [ROWS];
  logic [W-1:0] q_b  [ROWS], qq_b [ROWS];
  logic [W-1:0] q_m  [ROWS], qq_m [ROWS];
  // Horizontal chain: A in X rows, R in Y/Z and U/W rows.
  logic [COLS-1:0] h_d [ROWS];  // value used by each column
  logic [COLS-1:0] h_q [ROWS];  // its register, read by the next column east

  // ---- operand entry: skew B and M per column, A per row ------------------
  logic [W-1:0] b_ext, m_ext, b_sk, m_sk;
  assign b_ext = {3'b000, b};
  assign m_ext = {3'b111, m};

  for (genvar p = 0; p < W; p++) begin : g_in_skew
    localparam int unsigned D = COLS - 1 - sys_col(N_BITS, p);
    mm_delay #(.WIDTH(2), .DEPTH(D)) u_dly (
      .clk(clk), .d({b_ext[p], m_ext[p]}), .q({b_sk[p], m_sk[p]})
    );
  end

  logic [N_BITS-1:0] a_sk;      // a_sk[k] feeds the X^5 node of row 3k
  for (genvar k = 0; k < N_BITS; k++) begin : g_a_skew
    mm_delay #(.WIDTH(1), .DEPTH(6 * k)) u_dly (
      .clk(clk), .d(a[N_BITS-1-k]), .q(a_sk[k])
    );
  end

  // ---- the array -----------------------------------------------------------
  for (genvar j = 0; j < ROWS; j++) begin : g_row
    localparam row_kind_e KIND = row_kind_e'(j % 3);

    // Row inputs, bit by bit.
    for (genvar p = 0; p < W; p++) begin : g_bit
      // Column steps of the arcs that arrive at position p from p-1 and p-2.
      localparam int unsigned D1 = (p >= 1) ? sys_col(N_BITS, p) - sys_col(N_BITS, p - 1) : 0;
      localparam int unsigned D2 = (p >= 2) ? sys_col(N_BITS, p) - sys_col(N_BITS, p - 2) : 0;

      if (j == 0) begin : g_top
        assign in_b[j][p]  = b_sk[p];
        assign in_m[j][p]  = m_sk[p];
        assign in_s[j][p]  = 1'b0;
        assign in_c[j][p]  = 1'b0;
        assign in_mc[j][p] = 1'b0;
      end else begin : g_inner
        assign in_b[j][p] = qq_b[j-1][p];
        assign in_m[j][p] = qq_m[j-1][p];
        if (KIND == ROW_ADD) begin : g_add
          // 2S + 2C of the previous iteration's U/W row.
          if (p >= 1) begin : g_s
            assign in_s[j][p] = (D1 == 1) ? q_s[j-1][p-1] : qq_s[j-1][p-1];
          end else begin : g_s0
            assign in_s[j][p] = 1'b0;
          end
          if (p >= 2) begin : g_c
            assign in_c[j][p] = (D2 == 1) ? q_c[j-1][p-2] : qq_c[j-1][p-2];
          end else begin : g_c0
            assign in_c[j][p] = 1'b0;
          end
          assign in_mc[j][p] = 1'b0;
        end else begin : g_sub
          assign in_s[j][p] = qq_s[j-1][p];
          if (p >= 1) begin : g_c
            assign in_c[j][p] = (D1 == 1) ? q_c[j-1][p-1] : qq_c[j-1][p-1];
          end else begin : g_c0
            assign in_c[j][p] = 1'b0;
          end
          if (KIND == ROW_SUB2N) begin : g_m2
            // M' = 2M, taken from the X row one position to the east.
            if (p >= 1) begin : g_m
              assign in_mc[j][p] = (D1 == 1) ? q_m[j-1][p-1] : qq_m[j-1][p-1];
            end else begin : g_m0
              assign in_mc[j][p] = 1'b0;
            end
          end else begin : g_m1
            assign in_mc[j][p] = qq_m[j-1][p];
          end
        end
      end
    end

    // Nodes of the row.
    for (genvar i = 0; i < COLS; i++) begin : g_node
      localparam int unsigned PLO = col_lo(N_BITS, i);
      localparam int unsigned PHI = col_hi(N_BITS, i);
      localparam int unsigned K   = PHI - PLO + 1;

      if (KIND == ROW_ADD) begin : g_x
        if (i == COLS - 1) begin : g_a_in
          assign h_d[j][i] = a_sk[j/3];
        end else begin : g_a_east
          assign h_d[j][i] = h_q[j][i+1];
        end
        mm_super_x #(.K(K)) u_x (
          .a(h_d[j][i]), .b(in_b[j][PHI:PLO]),
          .s(in_s[j][PHI:PLO]), .c(in_c[j][PHI:PLO]),
          .s_out(out_s[j][PHI:PLO]), .c_out(out_c[j][PHI:PLO])
        );
      end else if (i == COLS - 1) begin : g_ly
        mm_super_ly u_ly (
          .m(in_mc[j][LO+4:LO]), .s(in_s[j][LO+4:LO]), .c(in_c[j][LO+4:LO]),
          .r(h_d[j][i]), .s_out(out_s[j][LO+4:LO]), .c_out(out_c[j][LO+4:LO])
        );
      end else begin : g_z
        assign h_d[j][i] = h_q[j][i+1];
        mm_super_z #(.K(K)) u_z (
          .r(h_d[j][i]), .m(in_mc[j][PHI:PLO]),
          .s(in_s[j][PHI:PLO]), .c(in_c[j][PHI:PLO]),
          .s_out(out_s[j][PHI:PLO]), .c_out(out_c[j][PHI:PLO])
        );
      end
    end

    always_ff @(posedge clk) begin
      q_s[j]  <= out_s[j];  qq_s[j] <= q_s[j];
      q_c[j]  <= out_c[j];  qq_c[j] <= q_c[j];
      q_b[j]  <= in_b[j];   qq_b[j] <= q_b[j];
      q_m[j]  <= in_m[j];   qq_m[j] <= q_m[j];
      h_q[j]  <= h_d[j];
    end
  end

  // ---- result: de-skew the last row ---------------------------------------
  logic [W-1:0] s_dk, c_dk, m_dk;
  for (genvar p = 0; p < W; p++) begin : g_out_skew
    mm_delay #(.WIDTH(3), .DEPTH(sys_col(N_BITS, p))) u_dly (
      .clk(clk),
      .d({q_s[ROWS-1][p], q_c[ROWS-1][p], q_m[ROWS-1][p]}),
      .q({s_dk[p], c_dk[p], m_dk[p]})
    );
  end

  assign s     = s_dk;
  assign c     = {c_dk[W-2:0], 1'b0};
  assign m_out = m_dk[N_BITS-1:0];

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];
endmodule
