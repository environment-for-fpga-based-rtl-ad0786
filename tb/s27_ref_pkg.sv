// s27_ref_pkg - reference models used by the testbenches.
//
// s27_step evaluates one clock of the ISCAS'89 s27 benchmark with an
// optional single stuck-at fault on one of its 17 nets (index order
// G0 G1 G2 G3 G5 G6 G7 G8 G9 G10 G11 G12 G13 G14 G15 G16 G17) and returns
// the output and the next state {G5, G6, G7}. lfsr_next gives the next
// state of the Fibonacci LFSR with feedback into bit 0 and an XORed-in
// analysed vector. s27_step_tv is the three-valued (0, 1, X) version of
// s27_step.
package s27_ref_pkg;
  typedef struct packed {
    logic       po;
    logic [2:0] next;    // {G5, G6, G7}
  } s27_res_t;

  function automatic s27_res_t s27_step(input logic [2:0] state, input logic [3:0] pi,
                                        input int fidx, input logic sv);
    logic v[17];
    s27_res_t r;
    // Net values are computed in topological order; a net carrying the
    // fault is forced right after it is computed.
    v[0] = pi[0];  if (fidx == 0) v[0] = sv;
    v[1] = pi[1];  if (fidx == 1) v[1] = sv;
    v[2] = pi[2];  if (fidx == 2) v[2] = sv;
    v[3] = pi[3];  if (fidx == 3) v[3] = sv;
    v[4] = state[2]; if (fidx == 4) v[4] = sv;   // G5
    v[5] = state[1]; if (fidx == 5) v[5] = sv;   // G6
    v[6] = state[0]; if (fidx == 6) v[6] = sv;   // G7
    v[13] = !v[0];            if (fidx == 13) v[13] = sv;  // G14
    v[11] = !(v[1] || v[6]);  if (fidx == 11) v[11] = sv;  // G12
    v[7]  = v[13] && v[5];    if (fidx == 7)  v[7]  = sv;  // G8
    v[14] = v[11] || v[7];    if (fidx == 14) v[14] = sv;  // G15
    v[15] = v[3] || v[7];     if (fidx == 15) v[15] = sv;  // G16
    v[8]  = !(v[15] && v[14]); if (fidx == 8) v[8]  = sv;  // G9
    v[10] = !(v[4] || v[8]);  if (fidx == 10) v[10] = sv;  // G11
    v[9]  = !(v[13] || v[10]); if (fidx == 9) v[9]  = sv;  // G10
    v[12] = !(v[2] || v[11]); if (fidx == 12) v[12] = sv;  // G13
    v[16] = !v[10];           if (fidx == 16) v[16] = sv;  // G17
    r.po   = v[16];
    r.next = {v[9], v[10], v[12]};
    return r;
  endfunction

  // Three-valued reference: values are 0, 1 and 2 (= unknown).
  typedef struct {
    int po;
    int next[3];   // G5, G6, G7
  } s27_tv_res_t;

  function automatic int t_not(input int a);
    return (a == 2) ? 2 : 1 - a;
  endfunction
  function automatic int t_and(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    if (a == 1 && b == 1) return 1;
    return 2;
  endfunction
  function automatic int t_or(input int a, input int b);
    if (a == 1 || b == 1) return 1;
    if (a == 0 && b == 0) return 0;
    return 2;
  endfunction

  function automatic s27_tv_res_t s27_step_tv(input int state[3], input logic [3:0] pi,
                                             input int fidx, input logic sv);
    int v[17];
    s27_tv_res_t r;
    for (int i = 0; i < 4; i++) begin v[i] = int'(pi[i]); if (fidx == i) v[i] = int'(sv); end
    for (int i = 0; i < 3; i++) begin v[4+i] = state[i]; if (fidx == 4+i) v[4+i] = int'(sv); end
    v[13] = t_not(v[0]);                  if (fidx == 13) v[13] = int'(sv);
    v[11] = t_not(t_or(v[1], v[6]));      if (fidx == 11) v[11] = int'(sv);
    v[7]  = t_and(v[13], v[5]);           if (fidx == 7)  v[7]  = int'(sv);
    v[14] = t_or(v[11], v[7]);            if (fidx == 14) v[14] = int'(sv);
    v[15] = t_or(v[3], v[7]);             if (fidx == 15) v[15] = int'(sv);
    v[8]  = t_not(t_and(v[15], v[14]));   if (fidx == 8)  v[8]  = int'(sv);
    v[10] = t_not(t_or(v[4], v[8]));      if (fidx == 10) v[10] = int'(sv);
    v[9]  = t_not(t_or(v[13], v[10]));    if (fidx == 9)  v[9]  = int'(sv);
    v[12] = t_not(t_or(v[2], v[11]));     if (fidx == 12) v[12] = int'(sv);
    v[16] = t_not(v[10]);                 if (fidx == 16) v[16] = int'(sv);
    r.po = v[16];
    r.next[0] = v[9]; r.next[1] = v[10]; r.next[2] = v[12];
    return r;
  endfunction

  // Dual-rail code of a reference value: 0 -> 2'b01, 1 -> 2'b10, X -> 2'b00.
  function automatic logic [1:0] t_code(input int a);
    return (a == 0) ? 2'b01 : (a == 1) ? 2'b10 : 2'b00;
  endfunction

  function automatic logic [31:0] lfsr_next(input logic [31:0] q, input logic [31:0] poly,
                                            input logic [31:0] res, input int width);
    logic [31:0] n;
    logic fb;
    fb = 1'b0;
    for (int i = 0; i < width; i++) fb ^= q[i] & poly[i];
    n = '0;
    for (int i = width - 1; i > 0; i--) n[i] = q[i-1];
    n[0] = fb;
    for (int i = 0; i < width; i++) n[i] ^= res[i];
    return n;
  endfunction
endpackage
