// fec_ref_pkg: reference model of the diffuse code used by the testbenches.
//
// Written directly from the code definition, independent of the RTL:
//   p_n = u_n ^ u_(n-beta) ^ u_(n-2beta) ^ u_(n-3beta-1)
// where u is the message followed by 3*beta+1 zeros (one more with the
// two-bit parity delay). The channel stream carries u_n then p_n for every
// information slot, or u_n then p_(n-1) with the parity delay.
package fec_ref_pkg;

  typedef bit bitq_t[$];

  function automatic int beta_of_sel(int sel);
    return 4 * (sel + 1);
  endfunction

  function automatic bit ubit(const ref bitq_t u, input int idx);
    if (idx < 0 || idx >= u.size()) return 1'b0;
    return u[idx];
  endfunction

  // Channel stream for one message.
  function automatic bitq_t encode(bitq_t msg, int beta, bit pdly);
    bitq_t u, par, ch;
    int f = 3 * beta + 1 + (pdly ? 1 : 0);
    u = msg;
    repeat (f) u.push_back(1'b0);
    foreach (u[n])
      par.push_back(ubit(u, n) ^ ubit(u, n - beta) ^ ubit(u, n - 2*beta) ^ ubit(u, n - 3*beta - 1));
    foreach (u[n]) begin
      ch.push_back(u[n]);
      if (pdly) ch.push_back(n > 0 ? par[n-1] : 1'b0);
      else      ch.push_back(par[n]);
    end
    return ch;
  endfunction

  // Random message of n bits.
  function automatic bitq_t random_msg(int n);
    bitq_t m;
    repeat (n) m.push_back(1'($urandom));
    return m;
  endfunction

endpackage
