// ft_tb_pkg: helpers shared by the testbenches of the fault tolerant memory.
//  - t_trans_req(l, p, e): least t with sum_{i>t} C(l,i) p^i (1-p)^(l-i) <= e,
//    the transient-fault requirement of a block of l bits at fault rate p and
//    target block error rate e. The binomial terms are formed by the ratio
//    recurrence and the tail is summed from the top so that no cancellation
//    occurs at tiny error rates.
//  - ttrans_entry: entry b of the allocators' t_trans table for bins of
//    2^shift lengths, taken at the longest length of the bin (a safe rounding).
package ft_tb_pkg;

  function automatic int t_trans_req(input int l, input real p, input real e);
    real pmf [];
    real tail;
    if (p <= 0.0) return 0;
    pmf = new[l + 1];
    pmf[0] = (1.0 - p) ** l;
    for (int i = 0; i < l; i++) pmf[i+1] = pmf[i] * real'(l - i) / real'(i + 1) * p / (1.0 - p);
    tail = 0.0;
    // tail(t) = sum_{i>t} pmf[i]; find least t with tail(t) <= e
    for (int t = l; t >= 0; t--) begin
      if (tail > e) return t + 1;
      tail += pmf[t];
    end
    return 0;
  endfunction

  function automatic int ttrans_entry(input int shift, input int b,
                                      input real p, input real e);
    return t_trans_req((b + 1) * (1 << shift) - 1, p, e);
  endfunction

endpackage
