// tb_bcd_util_pkg: reference arithmetic for the BCD testbenches.
// Converts between packed BCD and integers and draws random BCD operands, so
// that expected results are computed with ordinary integer arithmetic,
// independently of the gate-level units under test. Packed values are up to
// 16 digits (64 bits).
package tb_bcd_util_pkg;
  function automatic longint unsigned bcd2int(logic [63:0] v, int unsigned digits);
    longint unsigned r = 0;
    for (int i = int'(digits) - 1; i >= 0; i--) r = r * 10 + longint'(v[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [63:0] int2bcd(longint unsigned n, int unsigned digits);
    logic [63:0] v = '0;
    for (int i = 0; i < int'(digits); i++) begin
      v[4*i +: 4] = 4'(n % 10);
      n = n / 10;
    end
    return v;
  endfunction

  function automatic logic [63:0] rand_bcd(int unsigned digits);
    logic [63:0] v = '0;
    for (int i = 0; i < int'(digits); i++) v[4*i +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  // 10^digits
  function automatic longint unsigned pow10(int unsigned digits);
    longint unsigned r = 1;
    for (int i = 0; i < int'(digits); i++) r = r * 10;
    return r;
  endfunction

  // decimal carry out of each digit when adding a + b (digits ripple from 0)
  function automatic logic [15:0] add_carries(logic [63:0] a, logic [63:0] b, int unsigned digits);
    logic [15:0] c = '0;
    int unsigned cy = 0;
    for (int i = 0; i < int'(digits); i++) begin
      int unsigned t = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + cy;
      cy = (t >= 10) ? 1 : 0;
      c[i] = cy[0];
    end
    return c;
  endfunction

  // decimal borrow out of each digit when subtracting a - b
  function automatic logic [15:0] sub_borrows(logic [63:0] a, logic [63:0] b, int unsigned digits);
    logic [15:0] c = '0;
    int bw = 0;
    for (int i = 0; i < int'(digits); i++) begin
      int t = int'(a[4*i +: 4]) - int'(b[4*i +: 4]) - bw;
      bw = (t < 0) ? 1 : 0;
      c[i] = bw[0];
    end
    return c;
  endfunction

  // nine's complement of every digit
  function automatic logic [63:0] nines(logic [63:0] v, int unsigned digits);
    logic [63:0] r = '0;
    for (int i = 0; i < int'(digits); i++) r[4*i +: 4] = 4'(9 - int'(v[4*i +: 4]));
    return r;
  endfunction
endpackage
