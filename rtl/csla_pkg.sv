// csla_pkg: elaboration-time helpers that lay out the groups of the
// square-root carry select adder.
//
// The square-root carry select adder splits its operands into groups whose
// width grows by one bit per group towards the most significant end. The
// widest group sits at the top (16 bits, bits 127:112, for the 128-bit
// adder), the next one is one bit narrower (15 bits, 111:97), and so on. A
// 128-bit word is not a sum of consecutive widths, so whatever is left once
// the next width no longer fits becomes the bottom group (2 bits, 1:0, at the
// default size). The functions below compute that layout so the adder can
// build it with a generate loop; group 0 is the least significant one.
package csla_pkg;

  // Width of the k-th group counted down from the most significant end.
  function automatic int sqrt_width_from_top(int width, int max_w, int k);
    int rem = width;
    int s = 0;
    for (int j = 0; j <= k; j++) begin
      s = (max_w - j > 1) ? (max_w - j) : 1;
      if (s > rem) s = rem;
      rem -= s;
    end
    return s;
  endfunction

  // Number of groups of the square-root adder.
  function automatic int sqrt_num_groups(int width, int max_w);
    int rem = width;
    int n = 0;
    int s;
    for (int j = 0; j < width; j++) begin
      if (rem > 0) begin
        s = (max_w - j > 1) ? (max_w - j) : 1;
        if (s > rem) s = rem;
        rem -= s;
        n++;
      end
    end
    return n;
  endfunction

  // Width of group i, counted up from the least significant end.
  function automatic int sqrt_group_width(int width, int max_w, int i);
    return sqrt_width_from_top(width, max_w, sqrt_num_groups(width, max_w) - 1 - i);
  endfunction

  // Least significant bit position of group i.
  function automatic int sqrt_group_lsb(int width, int max_w, int i);
    int lsb = 0;
    for (int j = 0; j < i; j++) lsb += sqrt_group_width(width, max_w, j);
    return lsb;
  endfunction

endpackage
