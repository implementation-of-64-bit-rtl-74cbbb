// modified_wallace_mult: N x N unsigned multiplier (N = 64 by default) built
// as a reduced-complexity ("modified") Wallace tree.
//
// The multiplication runs in three phases, all combinational:
//   1. Partial products. The N*N bits a[i] & b[k] are formed and gathered by
//      weight, so column c (weight 2^c) holds min(c+1, 2N-1-c) bits: the
//      matrix rearranged into an inverted pyramid.
//   2. Reduction. Each stage takes the bits of every column in groups of
//      three and feeds each full group to a full adder (sum stays in the
//      column, carry moves one column up); a group of one or two bits passes
//      to the next stage unchanged. The number of rows the stage must leave
//      is r(j+1) = 2*floor(r(j)/3) + r(j) mod 3, starting from r(0) = N. Only
//      where a column would still hold more bits than that target is a pair
//      of passing bits put through a half adder instead. Stages repeat until
//      two rows are left; for N = 64 that is 10 stages, and half adders turn
//      up only in the last of them.
//   3. Final addition. The two remaining rows go to csa_adder, which
//      produces the 2N-bit product.
// These rules, the stage count and the use of the carry save adder as the
// final adder follow the description of the multiplier. How bits are
// ordered inside a column (passed bits first, then sums, then carries from
// the column below) and which pairs get half adders (lowest column first,
// greedily) are this design's choices.
//
// The wiring is computed at elaboration: build_table() plays the reduction
// through once and records, per stage and column, the column height and
// the number of full and half adders; the generate loops below instantiate
// exactly that. The final adder's carry-out is always zero, because the
// product of two N-bit numbers fits in 2N bits, and is left unconnected.
// STAGES, TOTAL_FA, TOTAL_HA and HA_BEFORE_LAST are kept for inspection
// from outside (the testbench reads them); the carry vector of the top
// column has no column to feed and stays unread. Lint reports these as
// unused, which is intended.
//
// Interface: a, b (N bits each) in, p (2N bits) out. No clock: the product
// is valid after the combinational delay of the tree plus the adder.
module modified_wallace_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  import mac_pkg::*;

  localparam int W       = 2 * N;              // product columns
  localparam int STAGES  = wallace_stages(N);  // reduction stages
  localparam int FIELD   = 8;                  // bits per table entry
  localparam int TBL_W   = (STAGES + 1) * W * FIELD;

  // Table kinds produced by build_table().
  localparam int KIND_HEIGHT = 0;
  localparam int KIND_FA     = 1;
  localparam int KIND_HA     = 2;

  // Plays the reduction through and returns, packed as FIELD-bit entries at
  // index (stage * W + column), the column heights (stages 0..STAGES) or the
  // number of full or half adders used (stages 0..STAGES-1).
  function automatic logic [TBL_W-1:0] build_table(input int kind);
    logic [TBL_W-1:0] t;
    int h  [W];
    int nh [W];
    int rows, target, nfa, rem, nha, left, cin;
    for (int i = 0; i < TBL_W; i++) t[i] = 1'b0;
    for (int c = 0; c < W; c++)
      h[c] = (c < N) ? c + 1 : ((c < W - 1) ? W - 1 - c : 0);
    rows = N;
    for (int j = 0; j <= STAGES; j++) begin
      if (kind == KIND_HEIGHT)
        for (int c = 0; c < W; c++) t[(j*W + c)*FIELD +: FIELD] = FIELD'(h[c]);
      if (j < STAGES) begin
        target = next_rows(rows);
        cin    = 0;
        for (int c = 0; c < W; c++) begin
          nfa  = h[c] / 3;
          rem  = h[c] % 3;
          nha  = 0;
          left = rem + nfa + cin;
          // A half adder only where the row-count target would be missed.
          while (left > target && rem >= 2) begin
            nha++;
            rem  -= 2;
            left -= 1;
          end
          if (kind == KIND_FA) t[(j*W + c)*FIELD +: FIELD] = FIELD'(nfa);
          if (kind == KIND_HA) t[(j*W + c)*FIELD +: FIELD] = FIELD'(nha);
          nh[c] = left;
          cin   = nfa + nha;
        end
        for (int c = 0; c < W; c++) h[c] = nh[c];
        rows = target;
      end
    end
    return t;
  endfunction

  localparam logic [TBL_W-1:0] HEIGHT = build_table(KIND_HEIGHT);
  localparam logic [TBL_W-1:0] NUM_FA = build_table(KIND_FA);
  localparam logic [TBL_W-1:0] NUM_HA = build_table(KIND_HA);

  function automatic int entry(input logic [TBL_W-1:0] tbl, input int j, input int c);
    return int'(tbl[(j*W + c)*FIELD +: FIELD]);
  endfunction

  // Adder totals, for reference and for checking against the description.
  function automatic int total(input logic [TBL_W-1:0] tbl, input int first, input int last);
    int n;
    n = 0;
    for (int j = first; j <= last; j++)
      for (int c = 0; c < W; c++) n += entry(tbl, j, c);
    return n;
  endfunction

  localparam int TOTAL_FA       = total(NUM_FA, 0, STAGES - 1);
  localparam int TOTAL_HA       = total(NUM_HA, 0, STAGES - 1);
  localparam int HA_BEFORE_LAST = total(NUM_HA, 0, STAGES - 2);

  function automatic int max_height(input int j);
    int m;
    m = 0;
    for (int c = 0; c < W; c++) if (entry(HEIGHT, j, c) > m) m = entry(HEIGHT, j, c);
    return m;
  endfunction

  // The schedule must leave at most two bits in every column.
  if (max_height(STAGES) > 2) begin : bad_schedule
    $error("reduction schedule leaves more than two rows");
  end

  // Bits of each stage: lvl[j].col[c][i] is bit i of column c entering
  // reduction stage j (lvl[STAGES] holds the final two rows).
  for (genvar j = 0; j <= STAGES; j++) begin : lvl
    logic [N-1:0] col [W];
  end

  // Phase 1: partial products, gathered by weight.
  for (genvar c = 0; c < W; c++) begin : pp
    localparam int H  = entry(HEIGHT, 0, c);
    localparam int LO = (c < N) ? 0 : c - (N - 1);   // lowest a index
    for (genvar i = 0; i < N; i++) begin : bit_g
      if (i < H) begin : used
        assign lvl[0].col[c][i] = a[LO + i] & b[c - LO - i];
      end else begin : unused
        assign lvl[0].col[c][i] = 1'b0;
      end
    end
  end

  // Phase 2: reduction stages.
  for (genvar j = 0; j < STAGES; j++) begin : rd
    for (genvar c = 0; c < W; c++) begin : cl
      localparam int H    = entry(HEIGHT, j, c);
      localparam int NF   = entry(NUM_FA, j, c);
      localparam int NH   = entry(NUM_HA, j, c);
      localparam int PASS = H - 3*NF - 2*NH;
      localparam int CIN  = (c == 0) ? 0 : entry(NUM_FA, j, c-1) + entry(NUM_HA, j, c-1);
      localparam int HOUT = entry(HEIGHT, j+1, c);

      logic [N-1:0] cy;   // carries leaving this column, to column c+1

      for (genvar k = 0; k < N; k++) begin : fa_g
        if (k < NF) begin : fa
          full_adder u_fa (
            .x  (lvl[j].col[c][3*k]),
            .y  (lvl[j].col[c][3*k+1]),
            .z  (lvl[j].col[c][3*k+2]),
            .s  (lvl[j+1].col[c][PASS+k]),
            .co (cy[k])
          );
        end
      end

      for (genvar k = 0; k < N; k++) begin : ha_g
        if (k < NH) begin : ha
          half_adder u_ha (
            .x  (lvl[j].col[c][3*NF + 2*k]),
            .y  (lvl[j].col[c][3*NF + 2*k + 1]),
            .s  (lvl[j+1].col[c][PASS+NF+k]),
            .co (cy[NF+k])
          );
        end
      end

      for (genvar k = 0; k < N; k++) begin : tie_g
        if (k >= NF + NH) begin : tie
          assign cy[k] = 1'b0;
        end
      end

      for (genvar k = 0; k < N; k++) begin : pass_g
        if (k < PASS) begin : pass
          assign lvl[j+1].col[c][k] = lvl[j].col[c][3*NF + 2*NH + k];
        end
      end

      if (c > 0) begin : carry_in
        for (genvar k = 0; k < N; k++) begin : ci_g
          if (k < CIN) begin : ci
            assign lvl[j+1].col[c][PASS + NF + NH + k] = rd[j].cl[c-1].cy[k];
          end
        end
      end

      for (genvar k = 0; k < N; k++) begin : zero_g
        if (k >= HOUT) begin : zero
          assign lvl[j+1].col[c][k] = 1'b0;
        end
      end
    end
  end

  // Phase 3: the two remaining rows go to the carry save adder.
  logic [W-1:0] row0, row1;
  logic         final_cout;   // always 0: an N x N product fits in 2N bits

  for (genvar c = 0; c < W; c++) begin : rows_g
    assign row0[c] = lvl[STAGES].col[c][0];
    if (N > 1) begin : two
      assign row1[c] = lvl[STAGES].col[c][1];
    end else begin : one
      assign row1[c] = 1'b0;
    end
  end

  csa_adder #(.W(W)) u_final (
    .x    (row0),
    .y    (row1),
    .cin  (1'b0),
    .s    (p),
    .cout (final_cout)
  );

endmodule
