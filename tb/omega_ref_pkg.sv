// omega_ref_pkg: reference routines for checking omega networks.
//
// route() computes the steering pair of every full switch of an N x N omega
// network for a mapping dest[src] with the destination-tag rule: at stage i
// the line goes to the upper switch output if destination bit di is 0 and
// to the lower one if it is 1. A switch needed in two different states makes
// the mapping unrealizable (the omega network is blocking) and route()
// returns 0. An input whose dest is negative is unused and sets no switch.
// Switch index is stage*N/2 + row; pair 10 = straight,
// 11 = exchange, 00 = unused (off).
package omega_ref_pkg;

  localparam int N  = 8;
  localparam int L  = 3;
  localparam int NS = N / 2;
  localparam int NSW = L * NS;

  function automatic int rotl(int p);
    return ((p << 1) | (p >> (L - 1))) & (N - 1);
  endfunction

  function automatic bit route(input int dest[N], output logic [1:0] st[NSW]);
    for (int i = 0; i < NSW; i++) st[i] = 2'b00;
    for (int src = 0; src < N; src++) begin
      int pos;
      if (dest[src] < 0) continue;
      pos = src;
      for (int s = 0; s < L; s++) begin
        int di;
        bit upper;
        logic [1:0] want;
        pos   = rotl(pos);
        di    = (dest[src] >> (L - 1 - s)) & 1;
        upper = (pos & 1) == 0;
        want  = ((upper && di == 0) || (!upper && di == 1)) ? 2'b10 : 2'b11;
        if (st[s*NS + pos/2] != 2'b00 && st[s*NS + pos/2] != want) return 0;
        st[s*NS + pos/2] = want;
        pos = (pos & ~1) | di;
      end
    end
    return 1;
  endfunction

  // random mapping that the network can realize (falls back to a rotation)
  function automatic void random_perm(output int dest[N], output logic [1:0] st[NSW]);
    for (int tries = 0; tries < 200; tries++) begin
      for (int i = 0; i < N; i++) dest[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = int'($urandom_range(i));
        t = dest[i]; dest[i] = dest[j]; dest[j] = t;
      end
      if (route(dest, st)) return;
    end
    for (int i = 0; i < N; i++) dest[i] = (i + 3) % N;
    void'(route(dest, st));
  endfunction

endpackage
