// Reference model of the approximate 8 x 8 Dadda multiplier for testbenches.
//
// The model does not copy the RTL netlist. It rebuilds the reduction tree at
// run time from the rules alone: columns of partial products (ordered by row),
// two stages with height targets 4 and 2, in each column compressors while
// three or more bits must go, then a full adder for two or a half adder for
// one, counting carries arriving from the column below. A column's next-stage
// bits are its untouched bits, then its cells' sums, then the carries of the
// column below. The compressor is evaluated from its truth table as sum = parity,
// carry = both input pairs non-zero.
package tb_approx_model_pkg;

  function automatic bit [1:0] ref_compressor(bit x1, bit x2, bit x3, bit x4);
    int unsigned ones;
    bit s, c;
    ones = int'(x1) + int'(x2) + int'(x3) + int'(x4);
    s = ones[0];
    // Exact carry except the three patterns that lose value: 0011, 1100, 1111.
    case ({x1, x2, x3, x4})
      4'b0011, 4'b1100: c = 1'b0;
      4'b1111:          c = 1'b1;
      default:          c = (ones >= 2);
    endcase
    return {c, s};
  endfunction

  function automatic int unsigned ref_mult(int unsigned a, int unsigned b);
    bit col  [16][12];
    int n    [16];
    bit nxt  [16][12];
    int nn   [16];
    bit cy   [17][12];
    int ncy  [17];
    int target, h, ex, pos, cells_prev;
    bit [1:0] r;
    int unsigned rowa, rowb;

    for (int c = 0; c < 16; c++) begin
      n[c] = 0;
      for (int i = 0; i < 8; i++) begin
        int j;
        j = c - i;
        if (j >= 0 && j < 8) begin
          col[c][n[c]] = bit'((a >> j) & (b >> i) & 1);
          n[c]++;
        end
      end
    end

    for (int st = 0; st < 2; st++) begin
      target = (st == 0) ? 4 : 2;
      cells_prev = 0;
      for (int c = 0; c < 17; c++) ncy[c] = 0;
      for (int c = 0; c < 16; c++) begin
        bit sums [4];
        int ns, ncell;
        ns = 0; ncell = 0; pos = 0;
        h = n[c] + cells_prev;
        ex = (h > target) ? h - target : 0;
        while (ex >= 3) begin
          r = ref_compressor(col[c][pos], col[c][pos+1], col[c][pos+2], col[c][pos+3]);
          pos += 4; ex -= 3;
          sums[ns++] = r[0]; cy[c+1][ncy[c+1]++] = r[1]; ncell++;
        end
        if (ex == 2) begin
          int t;
          t = int'(col[c][pos]) + int'(col[c][pos+1]) + int'(col[c][pos+2]);
          pos += 3;
          sums[ns++] = bit'(t & 1); cy[c+1][ncy[c+1]++] = bit'(t >> 1); ncell++;
        end else if (ex == 1) begin
          int t;
          t = int'(col[c][pos]) + int'(col[c][pos+1]);
          pos += 2;
          sums[ns++] = bit'(t & 1); cy[c+1][ncy[c+1]++] = bit'(t >> 1); ncell++;
        end
        cells_prev = ncell;
        nn[c] = 0;
        for (int k = pos; k < n[c]; k++) nxt[c][nn[c]++] = col[c][k];
        for (int k = 0; k < ns; k++)     nxt[c][nn[c]++] = sums[k];
      end
      for (int c = 0; c < 16; c++) begin
        for (int k = 0; k < ncy[c]; k++) nxt[c][nn[c]++] = cy[c][k];
        n[c] = nn[c];
        for (int k = 0; k < nn[c]; k++) col[c][k] = nxt[c][k];
      end
    end

    rowa = 0; rowb = 0;
    for (int c = 0; c < 16; c++) begin
      if (n[c] > 0) rowa |= int'(col[c][0]) << c;
      if (n[c] > 1) rowb |= int'(col[c][1]) << c;
    end
    return (rowa + rowb) & 32'hFFFF;
  endfunction

endpackage
