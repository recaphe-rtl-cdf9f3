// tb_math_pkg: reference arithmetic shared by the system-level testbenches
// (wide-integer modular multiply and power, bit reversal, Barrett constant,
// direct polynomial evaluation and schoolbook negacyclic product).
package tb_math_pkg;
  import recaphe_pkg::*;

  localparam logic [W-1:0] Q54   = 54'd18014398506729473;  // 1 mod 2^17
  localparam logic [W-1:0] PSI17 = 54'd8731769751126835;   // order 2^17

  function automatic logic [W-1:0] mm(input logic [W-1:0] x, y, q);
    return W'((128'(x) * 128'(y)) % 128'(q));
  endfunction

  function automatic logic [W-1:0] am(input logic [W-1:0] x, y, q);
    return W'((128'(x) + 128'(y)) % 128'(q));
  endfunction

  function automatic logic [W-1:0] pw(input logic [W-1:0] b, input longint unsigned e,
                                      input logic [W-1:0] q);
    logic [W-1:0] r, x;
    r = 1; x = b;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = mm(r, x, q);
      x = mm(x, x, q);
    end
    return r;
  endfunction

  function automatic int brv(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v >> i) & 1) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic logic [MW-1:0] barrett_m(input logic [W-1:0] q);
    logic [191:0] num;
    num = 192'd1 << (2 * clog2_dyn(q));
    return MW'(num / 192'(q));
  endfunction

  function automatic logic [W-1:0] rnd(input logic [W-1:0] q);
    return W'({$urandom(), $urandom()} % 64'(q));
  endfunction
endpackage
