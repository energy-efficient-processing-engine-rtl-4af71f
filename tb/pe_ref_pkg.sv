// pe_ref_pkg: reference model of the offset min-sum check-node update, used
// by the engine and system testbenches.
//
// Works on plain integers and on the textbook definition: each edge gets the
// minimum |Q| and the sign product taken over all the OTHER edges of its row,
// so it does not share the hardware's min1/min2/index method.
package pe_ref_pkg;

  localparam int MAXDEG = 64;

  function automatic int sm_to_int(logic [4:0] v);
    return v[4] ? -int'(v[3:0]) : int'(v[3:0]);
  endfunction

  function automatic logic [4:0] int_to_sm(int v);
    int a;
    a = (v < 0) ? -v : v;
    if (a > 15) a = 15;
    return {(v < 0) && (a != 0), 4'(a)};
  endfunction

  // l, r: row inputs as sign-magnitude; rn, ln: expected sign-magnitude outputs.
  function automatic void ref_row(input int deg, input int offset,
                                  input logic [4:0] l [MAXDEG], input logic [4:0] r [MAXDEG],
                                  output logic [4:0] rn [MAXDEG], output logic [4:0] ln [MAXDEG]);
    int q [MAXDEG];
    for (int j = 0; j < deg; j++) q[j] = sm_to_int(l[j]) - sm_to_int(r[j]);
    for (int j = 0; j < deg; j++) begin
      int m, neg, red, rv;
      m = 1000; neg = 0;
      for (int k = 0; k < deg; k++) if (k != j) begin
        int a;
        a = (q[k] < 0) ? -q[k] : q[k];
        if (a < m) m = a;
        if (q[k] < 0) neg ^= 1;
      end
      red = m - offset;
      if (red < 0) red = 0;
      if (red > 15) red = 15;
      rv = (neg != 0) ? -red : red;
      rn[j] = int_to_sm(rv);
      ln[j] = int_to_sm(q[j] + rv);
    end
  endfunction

endpackage
