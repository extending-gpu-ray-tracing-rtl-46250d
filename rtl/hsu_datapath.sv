// hsu_datapath: the HSU's unified single-lane datapath. One thread enters per
// cycle and leaves exactly PIPE_DEPTH = 9 cycles later; threads of different
// operating modes may follow each other back to back.
//
// Five operating modes share one set of floating-point functional units per
// stage (adders, multipliers, comparators); the opcode steers each unit's
// operands and the stage register fields. Units per stage, as the design
// provisions them (the maximum over the modes):
//   stage 1: 24 adders      box slab distances, triangle vertices - origin,
//                           16 Euclidean differences
//   stage 2: 24 multipliers box * inverse direction, triangle shear,
//                           squares (Euclidean), products (angular)
//   stage 3: 8 adders, 36 comparators
//                           box near/far and entry/exit, triangle shear
//                           subtraction, reduction trees, key compares
//   stage 4: 6 multipliers, 4 comparators   triangle edge products, box hits
//   stage 5: 4 adders       edge functions U,V,W, reduction trees
//   stage 6: 3 multipliers  U*Az, V*Bz, W*Cz
//   stage 7: 2 adders       det, T partial sums, reduction trees
//   stage 8: 2 adders       det, T, Euclidean final sum, angular accumulate
//   stage 9: 5 comparators, 1 adder, 4-input sorter
//                           triangle hit test, Euclidean accumulate, ordering
//                           of the four box hits by entry distance
//
// Modes and results (four 32-bit words per thread):
//   MODE_BOX     4 children slab test (ray origin, inverse direction, t range);
//                res = child pointers of the hits, nearest first, NULL_PTR
//                for misses.
//   MODE_TRI     watertight ray-triangle test without the double-precision
//                fallback; res = {hit, triangle id, t_num = T, t_denom = det}.
//                The t range check is left to software, which has T and det.
//   MODE_EUCLID  sum over 16 lanes of (q - c)^2.
//   MODE_ANGULAR dot product q.c and squared norm c.c over 8 lanes.
//   MODE_KEY     bit j = 1 when key >= separator j (j < count), else 0.
// With the accumulate bit set, Euclidean and angular threads add into a
// per-lane accumulator (stage 9 and stage 8 respectively) instead of
// producing a result; the next thread of that lane without the bit returns
// the accumulated total and clears the accumulator.
//
// The stage assignment follows the functional unit table of the design
// description. Operand and node word layouts, the node order on ties in the
// sorter, the key polarity for unused separators and flush-to-zero
// arithmetic are this design's choices. So is the stage register: one shared
// record of NW words per stage, whose words mean different things in each
// mode, instead of separate registers per mode. Every stage rounds its
// results, as the description does.
module hsu_datapath
  import hsu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  dp_in_t  in,
  output logic    out_valid,
  output dp_out_t out
);
  localparam int NW     = 40;
  localparam int SLOT_W = $clog2(RB_ENTRIES);
  localparam int LANE_W = $clog2(WARP_SIZE);

  typedef struct packed {
    logic              valid;
    dp_mode_e          mode;
    logic              acc;
    logic [SLOT_W-1:0] slot;
    logic [LANE_W-1:0] lane;
    word_t [NW-1:0]    w;
  } stage_t;

  stage_t r1, r2, r3, r4, r5, r6, r7, r8, r9;
  stage_t n1, n2, n3, n4, n5, n6, n7, n8, n9;

  // per-lane accumulators for multi-beat distance instructions
  word_t acc_e [WARP_SIZE];
  word_t acc_d [WARP_SIZE];
  word_t acc_n [WARP_SIZE];

  function automatic stage_t head(input stage_t s);
    stage_t h;
    h   = s;
    h.w = '0;
    return h;
  endfunction

  // ======================= stage 1: 24 adders ===============================
  word_t s1_a [24], s1_b [24], s1_y [24];
  for (genvar i = 0; i < 24; i++) begin : g_s1
    fp32_add u_add (.a(s1_a[i]), .b(s1_b[i]), .sub(1'b1), .y(s1_y[i]));
  end

  always_comb begin
    for (int i = 0; i < 24; i++) begin s1_a[i] = '0; s1_b[i] = '0; end
    case (in.mode)
      MODE_BOX:
        for (int c = 0; c < 4; c++)
          for (int a = 0; a < 3; a++) begin
            s1_a[c*6+a]   = in.node[7*c+a];     s1_b[c*6+a]   = in.opnd[a];
            s1_a[c*6+3+a] = in.node[7*c+3+a];   s1_b[c*6+3+a] = in.opnd[a];
          end
      MODE_TRI:
        for (int v = 0; v < 3; v++)
          for (int a = 0; a < 3; a++) begin
            s1_a[3*v+a] = in.node[3*v+a];       s1_b[3*v+a] = in.opnd[a];
          end
      MODE_EUCLID:
        for (int i = 0; i < 16; i++) begin
          s1_a[i] = in.opnd[i];                 s1_b[i] = in.node[i];
        end
      default: ;
    endcase
  end

  always_comb begin
    n1       = '0;
    n1.valid = in_valid;
    n1.mode  = in.mode;
    n1.acc   = in.acc;
    n1.slot  = in.slot;
    n1.lane  = in.lane;
    case (in.mode)
      MODE_BOX: begin
        for (int i = 0; i < 24; i++) n1.w[i] = s1_y[i];
        for (int a = 0; a < 3; a++)  n1.w[24+a] = in.opnd[3+a];   // 1/dir
        n1.w[27] = in.opnd[6];                                   // t_min
        n1.w[28] = in.opnd[7];                                   // t_max
        for (int c = 0; c < 4; c++)  n1.w[29+c] = in.node[7*c+6]; // child
      end
      MODE_TRI: begin
        for (int i = 0; i < 9; i++) n1.w[i] = s1_y[i];
        for (int a = 0; a < 3; a++) n1.w[9+a] = in.opnd[8+a];     // Sx,Sy,Sz
        n1.w[12] = in.opnd[11];                                  // kx,ky,kz
        n1.w[13] = in.node[9];                                   // tri id
      end
      MODE_EUCLID:
        for (int i = 0; i < 16; i++) n1.w[i] = s1_y[i];
      MODE_ANGULAR:
        for (int i = 0; i < 8; i++) begin
          n1.w[i]   = in.opnd[i];
          n1.w[8+i] = in.node[i];
        end
      default: begin   // MODE_KEY
        for (int j = 0; j < 36; j++) n1.w[j] = in.node[j];
        n1.w[36] = in.opnd[0];                                   // key
        n1.w[37] = in.opnd[1];                                   // count
      end
    endcase
  end

  // ======================= stage 2: 24 multipliers ==========================
  word_t s2_a [24], s2_b [24], s2_y [24];
  for (genvar i = 0; i < 24; i++) begin : g_s2
    fp32_mul u_mul (.a(s2_a[i]), .b(s2_b[i]), .y(s2_y[i]));
  end

  // triangle: permute vertex coordinates so that z is the ray's major axis
  word_t tri_px [3], tri_py [3], tri_pz [3];
  always_comb begin
    logic [1:0] kx, ky, kz;
    kx = r1.w[12][1:0];
    ky = r1.w[12][3:2];
    kz = r1.w[12][5:4];
    for (int v = 0; v < 3; v++) begin
      tri_px[v] = r1.w[3*v + 32'(kx)];
      tri_py[v] = r1.w[3*v + 32'(ky)];
      tri_pz[v] = r1.w[3*v + 32'(kz)];
    end
  end

  always_comb begin
    for (int i = 0; i < 24; i++) begin s2_a[i] = '0; s2_b[i] = '0; end
    case (r1.mode)
      MODE_BOX:
        for (int i = 0; i < 24; i++) begin
          s2_a[i] = r1.w[i];
          s2_b[i] = r1.w[24 + (i % 3)];
        end
      MODE_TRI:
        for (int v = 0; v < 3; v++)
          for (int a = 0; a < 3; a++) begin
            s2_a[3*v+a] = r1.w[9+a];            // Sx, Sy, Sz
            s2_b[3*v+a] = tri_pz[v];
          end
      MODE_EUCLID:
        for (int i = 0; i < 16; i++) begin
          s2_a[i] = r1.w[i];                    s2_b[i] = r1.w[i];
        end
      MODE_ANGULAR:
        for (int i = 0; i < 8; i++) begin
          s2_a[i]   = r1.w[i];                  s2_b[i]   = r1.w[8+i];
          s2_a[8+i] = r1.w[8+i];                s2_b[8+i] = r1.w[8+i];
        end
      default: ;
    endcase
  end

  always_comb begin
    n2 = head(r1);
    case (r1.mode)
      MODE_BOX: begin
        for (int i = 0; i < 24; i++) n2.w[i] = s2_y[i];
        for (int i = 27; i < 33; i++) n2.w[i] = r1.w[i];
      end
      MODE_TRI: begin
        for (int i = 0; i < 9; i++) n2.w[i] = s2_y[i];
        for (int v = 0; v < 3; v++) begin
          n2.w[9+2*v]  = tri_px[v];
          n2.w[10+2*v] = tri_py[v];
        end
        n2.w[15] = r1.w[13];
      end
      MODE_EUCLID, MODE_ANGULAR:
        for (int i = 0; i < 16; i++) n2.w[i] = s2_y[i];
      default: n2.w = r1.w;
    endcase
  end

  // ============ stage 3: 8 adders, 36 comparators ===========================
  word_t s3_a [8], s3_b [8], s3_y [8];
  for (genvar i = 0; i < 8; i++) begin : g_s3a
    fp32_add u_add (.a(s3_a[i]), .b(s3_b[i]), .sub(r2.mode == MODE_TRI), .y(s3_y[i]));
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin s3_a[i] = '0; s3_b[i] = '0; end
    case (r2.mode)
      MODE_TRI:
        for (int v = 0; v < 3; v++) begin
          s3_a[2*v]   = r2.w[9+2*v];  s3_b[2*v]   = r2.w[3*v];     // px - Sx*pz
          s3_a[2*v+1] = r2.w[10+2*v]; s3_b[2*v+1] = r2.w[3*v+1];   // py - Sy*pz
        end
      MODE_EUCLID:
        for (int i = 0; i < 8; i++) begin
          s3_a[i] = r2.w[2*i];        s3_b[i] = r2.w[2*i+1];
        end
      MODE_ANGULAR:
        for (int i = 0; i < 4; i++) begin
          s3_a[i]   = r2.w[2*i];      s3_b[i]   = r2.w[2*i+1];
          s3_a[4+i] = r2.w[8+2*i];    s3_b[4+i] = r2.w[9+2*i];
        end
      default: ;
    endcase
  end

  // Comparators, nine per box child. In key mode comparator 9c+k compares
  // the key with separator 9c+k; in box mode they form, per child, three
  // near/far swaps, a max-of-four for t_entry and a min-of-four for t_exit.
  logic  key_mode3;
  word_t t_near3 [4], t_far3 [4];
  logic [35:0] key_lt3;
  assign key_mode3 = (r2.mode == MODE_KEY);

  for (genvar c = 0; c < 4; c++) begin : g_s3c
    word_t a0, a1, a2, b0, b1, b2;                 // swaps
    word_t a3, b3, a4, b4, a5, b5;                 // entry = max(near, t_min)
    word_t a6, b6, a7, b7, a8, b8;                 // exit  = min(far, t_max)
    logic  l0, l1, l2, l3, l4, l5, l6, l7, l8;
    logic  e0, e1, e2, e3, e4, e5, e6, e7, e8;
    word_t nx, ny, nz, fx, fy, fz, nmax01, nmax012, fmin01, fmin012;
    fp32_cmp u_c0 (.a(a0), .b(b0), .lt(l0), .eq(e0));
    fp32_cmp u_c1 (.a(a1), .b(b1), .lt(l1), .eq(e1));
    fp32_cmp u_c2 (.a(a2), .b(b2), .lt(l2), .eq(e2));
    fp32_cmp u_c3 (.a(a3), .b(b3), .lt(l3), .eq(e3));
    fp32_cmp u_c4 (.a(a4), .b(b4), .lt(l4), .eq(e4));
    fp32_cmp u_c5 (.a(a5), .b(b5), .lt(l5), .eq(e5));
    fp32_cmp u_c6 (.a(a6), .b(b6), .lt(l6), .eq(e6));
    fp32_cmp u_c7 (.a(a7), .b(b7), .lt(l7), .eq(e7));
    fp32_cmp u_c8 (.a(a8), .b(b8), .lt(l8), .eq(e8));
    // level 1: per-axis swap of the two slab distances (lo < hi ?)
    assign a0 = key_mode3 ? r2.w[36] : r2.w[6*c+0];
    assign b0 = key_mode3 ? r2.w[9*c+0] : r2.w[6*c+3];
    assign a1 = key_mode3 ? r2.w[36] : r2.w[6*c+1];
    assign b1 = key_mode3 ? r2.w[9*c+1] : r2.w[6*c+4];
    assign a2 = key_mode3 ? r2.w[36] : r2.w[6*c+2];
    assign b2 = key_mode3 ? r2.w[9*c+2] : r2.w[6*c+5];
    assign nx = l0 ? r2.w[6*c+0] : r2.w[6*c+3];
    assign fx = l0 ? r2.w[6*c+3] : r2.w[6*c+0];
    assign ny = l1 ? r2.w[6*c+1] : r2.w[6*c+4];
    assign fy = l1 ? r2.w[6*c+4] : r2.w[6*c+1];
    assign nz = l2 ? r2.w[6*c+2] : r2.w[6*c+5];
    assign fz = l2 ? r2.w[6*c+5] : r2.w[6*c+2];
    // level 2..4: running max of the near distances and t_min
    assign a3 = key_mode3 ? r2.w[36] : nx;
    assign b3 = key_mode3 ? r2.w[9*c+3] : ny;
    assign nmax01 = l3 ? ny : nx;
    assign a4 = key_mode3 ? r2.w[36] : nmax01;
    assign b4 = key_mode3 ? r2.w[9*c+4] : nz;
    assign nmax012 = l4 ? nz : nmax01;
    assign a5 = key_mode3 ? r2.w[36] : nmax012;
    assign b5 = key_mode3 ? r2.w[9*c+5] : r2.w[27];
    assign t_near3[c] = l5 ? r2.w[27] : nmax012;
    // running min of the far distances and t_max
    assign a6 = key_mode3 ? r2.w[36] : fy;
    assign b6 = key_mode3 ? r2.w[9*c+6] : fx;
    assign fmin01 = l6 ? fy : fx;
    assign a7 = key_mode3 ? r2.w[36] : fz;
    assign b7 = key_mode3 ? r2.w[9*c+7] : fmin01;
    assign fmin012 = l7 ? fz : fmin01;
    assign a8 = key_mode3 ? r2.w[36] : r2.w[28];
    assign b8 = key_mode3 ? r2.w[9*c+8] : fmin012;
    assign t_far3[c] = l8 ? r2.w[28] : fmin012;
    assign key_lt3[9*c +: 9] = {l8, l7, l6, l5, l4, l3, l2, l1, l0};
  end

  always_comb begin
    logic [35:0] bits;
    bits = '0;
    n3 = head(r2);
    case (r2.mode)
      MODE_BOX:
        for (int c = 0; c < 4; c++) begin
          n3.w[c]   = t_near3[c];
          n3.w[4+c] = t_far3[c];
          n3.w[8+c] = r2.w[29+c];
        end
      MODE_TRI: begin
        for (int i = 0; i < 6; i++) n3.w[i] = s3_y[i];
        for (int v = 0; v < 3; v++) n3.w[6+v] = r2.w[3*v+2];   // Sz*pz
        n3.w[9] = r2.w[15];
      end
      MODE_EUCLID, MODE_ANGULAR:
        for (int i = 0; i < 8; i++) n3.w[i] = s3_y[i];
      default: begin   // MODE_KEY
        for (int j = 0; j < 36; j++)
          bits[j] = (32'(j) < r2.w[37]) && !key_lt3[j];
        n3.w[0] = bits[31:0];
        n3.w[1] = {28'd0, bits[35:32]};
      end
    endcase
  end

  // ============ stage 4: 6 multipliers, 4 comparators =======================
  word_t s4_y [6];
  logic  s4_lt [4], s4_eq [4];
  for (genvar i = 0; i < 6; i++) begin : g_s4m
    // products Cx*By, Cy*Bx, Ax*Cy, Ay*Cx, Bx*Ay, By*Ax
    localparam int IA = (i == 0) ? 4 : (i == 1) ? 5 : (i == 2) ? 0 : (i == 3) ? 1 : (i == 4) ? 2 : 3;
    localparam int IB = (i == 0) ? 3 : (i == 1) ? 2 : (i == 2) ? 5 : (i == 3) ? 4 : (i == 4) ? 1 : 0;
    fp32_mul u_mul (.a((r3.mode == MODE_TRI) ? r3.w[IA] : FP_ZERO),
                    .b((r3.mode == MODE_TRI) ? r3.w[IB] : FP_ZERO), .y(s4_y[i]));
  end
  for (genvar c = 0; c < 4; c++) begin : g_s4c
    fp32_cmp u_cmp (.a(r3.w[c]), .b(r3.w[4+c]), .lt(s4_lt[c]), .eq(s4_eq[c]));
  end

  always_comb begin
    n4 = head(r3);
    case (r3.mode)
      MODE_BOX: begin
        for (int c = 0; c < 4; c++) begin
          n4.w[c]    = r3.w[c];                       // t_entry
          n4.w[4+c]  = r3.w[8+c];                     // child pointer
          n4.w[8][c] = s4_lt[c] | s4_eq[c];           // entry <= exit
        end
      end
      MODE_TRI: begin
        for (int i = 0; i < 6; i++) n4.w[i] = s4_y[i];
        for (int i = 6; i < 10; i++) n4.w[i] = r3.w[i];
      end
      default: n4.w = r3.w;
    endcase
  end

  // ======================= stage 5: 4 adders ================================
  word_t s5_a [4], s5_b [4], s5_y [4];
  for (genvar i = 0; i < 4; i++) begin : g_s5
    fp32_add u_add (.a(s5_a[i]), .b(s5_b[i]), .sub(r4.mode == MODE_TRI), .y(s5_y[i]));
  end
  always_comb begin
    for (int i = 0; i < 4; i++) begin s5_a[i] = r4.w[2*i]; s5_b[i] = r4.w[2*i+1]; end
    if (r4.mode == MODE_TRI) begin s5_a[3] = '0; s5_b[3] = '0; end
  end
  always_comb begin
    n5 = head(r4);
    case (r4.mode)
      MODE_TRI: begin
        for (int i = 0; i < 3; i++) n5.w[i] = s5_y[i];     // U, V, W
        for (int i = 0; i < 4; i++) n5.w[3+i] = r4.w[6+i]; // Az,Bz,Cz,id
      end
      MODE_EUCLID, MODE_ANGULAR:
        for (int i = 0; i < 4; i++) n5.w[i] = s5_y[i];
      default: n5.w = r4.w;
    endcase
  end

  // ======================= stage 6: 3 multipliers ===========================
  word_t s6_y [3];
  for (genvar i = 0; i < 3; i++) begin : g_s6
    fp32_mul u_mul (.a((r5.mode == MODE_TRI) ? r5.w[i]   : FP_ZERO),
                    .b((r5.mode == MODE_TRI) ? r5.w[3+i] : FP_ZERO), .y(s6_y[i]));
  end
  always_comb begin
    n6 = head(r5);
    if (r5.mode == MODE_TRI) begin
      for (int i = 0; i < 3; i++) n6.w[i]   = r5.w[i];
      for (int i = 0; i < 3; i++) n6.w[3+i] = s6_y[i];
      n6.w[6] = r5.w[6];
    end else begin
      n6.w = r5.w;
    end
  end

  // ======================= stage 7: 2 adders ================================
  word_t s7_a [2], s7_b [2], s7_y [2];
  for (genvar i = 0; i < 2; i++) begin : g_s7
    fp32_add u_add (.a(s7_a[i]), .b(s7_b[i]), .sub(1'b0), .y(s7_y[i]));
  end
  always_comb begin
    if (r6.mode == MODE_TRI) begin
      s7_a[0] = r6.w[0]; s7_b[0] = r6.w[1];     // U + V
      s7_a[1] = r6.w[3]; s7_b[1] = r6.w[4];     // U*Az + V*Bz
    end else begin
      s7_a[0] = r6.w[0]; s7_b[0] = r6.w[1];
      s7_a[1] = r6.w[2]; s7_b[1] = r6.w[3];
    end
  end
  always_comb begin
    n7 = head(r6);
    case (r6.mode)
      MODE_TRI: begin
        for (int i = 0; i < 3; i++) n7.w[i] = r6.w[i];
        n7.w[3] = s7_y[0];
        n7.w[4] = s7_y[1];
        n7.w[5] = r6.w[5];
        n7.w[6] = r6.w[6];
      end
      MODE_EUCLID, MODE_ANGULAR: begin
        n7.w[0] = s7_y[0];
        n7.w[1] = s7_y[1];
      end
      default: n7.w = r6.w;
    endcase
  end

  // ================= stage 8: 2 adders (angular accumulate) =================
  word_t s8_a [2], s8_b [2], s8_y [2];
  for (genvar i = 0; i < 2; i++) begin : g_s8
    fp32_add u_add (.a(s8_a[i]), .b(s8_b[i]), .sub(1'b0), .y(s8_y[i]));
  end
  always_comb begin
    s8_a[0] = '0; s8_b[0] = '0; s8_a[1] = '0; s8_b[1] = '0;
    case (r7.mode)
      MODE_TRI: begin
        s8_a[0] = r7.w[3]; s8_b[0] = r7.w[2];   // det = (U + V) + W
        s8_a[1] = r7.w[4]; s8_b[1] = r7.w[5];   // T = (U*Az + V*Bz) + W*Cz
      end
      MODE_EUCLID: begin
        s8_a[0] = r7.w[0]; s8_b[0] = r7.w[1];
      end
      MODE_ANGULAR: begin
        s8_a[0] = r7.w[0]; s8_b[0] = acc_d[r7.lane];
        s8_a[1] = r7.w[1]; s8_b[1] = acc_n[r7.lane];
      end
      default: ;
    endcase
  end
  always_comb begin
    n8 = head(r7);
    case (r7.mode)
      MODE_TRI: begin
        for (int i = 0; i < 3; i++) n8.w[i] = r7.w[i];
        n8.w[3] = s8_y[0];
        n8.w[4] = s8_y[1];
        n8.w[5] = r7.w[6];
      end
      MODE_EUCLID: n8.w[0] = s8_y[0];
      MODE_ANGULAR: begin
        n8.w[0] = s8_y[0];
        n8.w[1] = s8_y[1];
      end
      default: n8.w = r7.w;
    endcase
  end

  // ===== stage 9: 5 comparators, 1 adder (Euclidean accumulate), sorter =====
  word_t s9_y;
  fp32_add u_s9_add (.a((r8.mode == MODE_EUCLID) ? r8.w[0] : FP_ZERO),
                     .b((r8.mode == MODE_EUCLID) ? acc_e[r8.lane] : FP_ZERO),
                     .sub(1'b0), .y(s9_y));

  // triangle tests: U, V, W against 0, det against 0, sign(T) vs sign(det)
  logic  tc_lt [5], tc_eq [5];
  word_t tc_a  [5];
  always_comb begin
    tc_a[0] = r8.w[0];
    tc_a[1] = r8.w[1];
    tc_a[2] = r8.w[2];
    tc_a[3] = r8.w[3];
    tc_a[4] = {r8.w[4][31] ^ r8.w[3][31], r8.w[4][30:0]};
  end
  for (genvar i = 0; i < 5; i++) begin : g_s9c
    fp32_cmp u_cmp (.a(tc_a[i]), .b(FP_ZERO), .lt(tc_lt[i]), .eq(tc_eq[i]));
  end

  // 4-input sorting network on (entry distance, pointer); misses sort as +inf
  word_t sk0 [4], sp0 [4], sk1 [4], sp1 [4], sk2 [4], sp2 [4], sp3 [4];
  logic  so_lt0, so_lt1, so_lt2, so_lt3, so_lt4;
  always_comb
    for (int c = 0; c < 4; c++) begin
      sk0[c] = r8.w[8][c] ? r8.w[c] : FP_POS_INF;
      sp0[c] = r8.w[8][c] ? r8.w[4+c] : NULL_PTR;
    end
  fp32_cmp u_so0 (.a(sk0[1]), .b(sk0[0]), .lt(so_lt0), .eq());
  fp32_cmp u_so1 (.a(sk0[3]), .b(sk0[2]), .lt(so_lt1), .eq());
  always_comb begin
    sk1[0] = so_lt0 ? sk0[1] : sk0[0];  sp1[0] = so_lt0 ? sp0[1] : sp0[0];
    sk1[1] = so_lt0 ? sk0[0] : sk0[1];  sp1[1] = so_lt0 ? sp0[0] : sp0[1];
    sk1[2] = so_lt1 ? sk0[3] : sk0[2];  sp1[2] = so_lt1 ? sp0[3] : sp0[2];
    sk1[3] = so_lt1 ? sk0[2] : sk0[3];  sp1[3] = so_lt1 ? sp0[2] : sp0[3];
  end
  fp32_cmp u_so2 (.a(sk1[2]), .b(sk1[0]), .lt(so_lt2), .eq());
  fp32_cmp u_so3 (.a(sk1[3]), .b(sk1[1]), .lt(so_lt3), .eq());
  always_comb begin
    sk2[0] = so_lt2 ? sk1[2] : sk1[0];  sp2[0] = so_lt2 ? sp1[2] : sp1[0];
    sk2[2] = so_lt2 ? sk1[0] : sk1[2];  sp2[2] = so_lt2 ? sp1[0] : sp1[2];
    sk2[1] = so_lt3 ? sk1[3] : sk1[1];  sp2[1] = so_lt3 ? sp1[3] : sp1[1];
    sk2[3] = so_lt3 ? sk1[1] : sk1[3];  sp2[3] = so_lt3 ? sp1[1] : sp1[3];
  end
  fp32_cmp u_so4 (.a(sk2[2]), .b(sk2[1]), .lt(so_lt4), .eq());
  always_comb begin
    sp3[0] = sp2[0];
    sp3[1] = so_lt4 ? sp2[2] : sp2[1];
    sp3[2] = so_lt4 ? sp2[1] : sp2[2];
    sp3[3] = sp2[3];
  end

  always_comb begin
    logic neg_any, pos_any, hit;
    neg_any = tc_lt[0] | tc_lt[1] | tc_lt[2];
    pos_any = (!tc_lt[0] && !tc_eq[0]) || (!tc_lt[1] && !tc_eq[1]) || (!tc_lt[2] && !tc_eq[2]);
    hit     = !(neg_any && pos_any) && !tc_eq[3] && !tc_lt[4];
    n9 = head(r8);
    case (r8.mode)
      MODE_BOX:     for (int c = 0; c < 4; c++) n9.w[c] = sp3[c];
      MODE_TRI: begin
        n9.w[0] = {31'd0, hit};
        n9.w[1] = r8.w[5];     // triangle id
        n9.w[2] = r8.w[4];     // t_num   (T)
        n9.w[3] = r8.w[3];     // t_denom (det)
      end
      MODE_EUCLID:  n9.w[0] = s9_y;
      MODE_ANGULAR: begin
        n9.w[0] = r8.w[0];     // dot_sum
        n9.w[1] = r8.w[1];     // norm_sum
      end
      default: begin           // MODE_KEY
        n9.w[0] = r8.w[0];
        n9.w[1] = r8.w[1];
      end
    endcase
    // only distance modes accumulate
    n9.acc = r8.acc && (r8.mode == MODE_EUCLID || r8.mode == MODE_ANGULAR);
  end

  // ======================= pipeline registers ===============================
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0; r5 <= '0;
      r6 <= '0; r7 <= '0; r8 <= '0; r9 <= '0;
    end else begin
      r1 <= n1; r2 <= n2; r3 <= n3; r4 <= n4; r5 <= n5;
      r6 <= n6; r7 <= n7; r8 <= n8; r9 <= n9;
    end
  end

  // accumulators: written by a partial beat, cleared by the closing beat
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < WARP_SIZE; l++) begin
        acc_e[l] <= '0; acc_d[l] <= '0; acc_n[l] <= '0;
      end
    end else begin
      if (r7.valid && r7.mode == MODE_ANGULAR) begin
        acc_d[r7.lane] <= r7.acc ? s8_y[0] : FP_ZERO;
        acc_n[r7.lane] <= r7.acc ? s8_y[1] : FP_ZERO;
      end
      if (r8.valid && r8.mode == MODE_EUCLID)
        acc_e[r8.lane] <= r8.acc ? s9_y : FP_ZERO;
    end
  end

  assign out_valid = r9.valid;
  always_comb begin
    out.acc  = r9.acc;
    out.slot = r9.slot;
    out.lane = r9.lane;
    for (int i = 0; i < RES_WORDS; i++) out.res[i] = r9.w[i];
  end

endmodule
