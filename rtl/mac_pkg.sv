// mac_pkg: widths shared by the 64-bit multiply-accumulate unit and the
// row-count rule of the reduced-complexity Wallace reduction.
//
// The operand width (64), product width (128) and accumulator width
// (128 sum bits plus one carry bit = 129) are the sizes the MAC is specified
// with. next_rows() is the row-count recurrence r(j+1) = 2*floor(r(j)/3) +
// r(j) mod 3 that sets, for every reduction stage, how many rows the stage
// must leave; wallace_stages() counts the stages needed to get from n rows to
// two. Both are constant functions used at elaboration only.
package mac_pkg;

  localparam int unsigned OPERAND_W = 64;               // a and b
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;    // 128-bit product
  localparam int unsigned ACC_W     = PRODUCT_W + 1;    // 128 bits + carry

  // Rows left after one reduction stage: every full group of three rows
  // becomes two (sum and carry), one or two left-over rows pass unchanged.
  function automatic int next_rows(input int r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Number of reduction stages needed to bring n rows down to two.
  function automatic int wallace_stages(input int n);
    int r;
    int s;
    r = n;
    s = 0;
    while (r > 2) begin
      r = next_rows(r);
      s++;
    end
    return s;
  endfunction

endpackage
