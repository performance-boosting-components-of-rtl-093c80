// Reference model of the DMC check bits for the testbenches, written from
// the check-bit equations with integer arithmetic.
package dmc_ref_pkg;
  function automatic logic [67:0] encode(input logic [31:0] d);
    logic [19:0] h;
    logic [15:0] v;
    h[4:0]   = 5'(int'(d[3:0])   + int'(d[11:8]));
    h[9:5]   = 5'(int'(d[7:4])   + int'(d[15:12]));
    h[14:10] = 5'(int'(d[19:16]) + int'(d[27:24]));
    h[19:15] = 5'(int'(d[23:20]) + int'(d[31:28]));
    for (int i = 0; i < 16; i++) v[i] = d[i] ^ d[i+16];
    return {h, v, d};
  endfunction

  // An upset pattern that the code corrects: one or two neighbouring 4-bit
  // symbols of the same row, each with a random non-zero pattern.
  function automatic logic [67:0] burst(input bit two);
    logic [31:0] m;
    int k;
    logic [3:0] p;
    m = '0;
    k = int'($urandom % 8);
    if (two && (k % 4) == 3) k--;
    do p = 4'($urandom); while (p == 4'h0);
    m[k*4 +: 4] = p;
    if (two) begin
      do p = 4'($urandom); while (p == 4'h0);
      m[(k+1)*4 +: 4] = p;
    end
    return {36'h0, m};
  endfunction
endpackage
