// conc_model_pkg: reference model of the recursive concentrator for the
// testbenches. It walks the network level by level with a work list
// instead of instantiating hardware, and routes integer tags: given the
// configuration bits and one tag per input, it returns the tag that each
// output carries. Sizes and configuration layout come from conc_pkg; the
// routing itself is written out independently of the RTL.
package conc_model_pkg;
  import conc_pkg::*;

  // tags at the outputs of an (n,m) conc_net with configuration cfg
  function automatic void conc_model(input int n, input int m, input bit cfg[],
                                     input int din[], output int dout[]);
    int pool[$];
    int qn[$], qm[$], qc[$], qo[$], qs[$];
    dout = new[m];
    foreach (din[i]) pool.push_back(din[i]);
    qn.push_back(n); qm.push_back(m); qc.push_back(0); qo.push_back(0); qs.push_back(0);
    while (qn.size() > 0) begin
      int cn, cm, cc, co, cs;
      cn = qn.pop_front(); cm = qm.pop_front(); cc = qc.pop_front();
      co = qo.pop_front(); cs = qs.pop_front();
      if (cm <= 2) begin
        int sw;
        sw = int'(leaf_sel_w(cn, cm));
        for (int j = 0; j < cm; j++) begin
          int sel;
          sel = 0;
          for (int b = 0; b < sw; b++) sel |= int'(cfg[cc + j*sw + b]) << b;
          if (sel > cn - cm) sel = cn - cm;
          dout[co + j] = pool[cs + j + sel];
        end
      end else begin
        int nx, nu, nl, mu, ml, cu, us, ls;
        nx = int'(n_xbar(cn, cm)); nu = int'(n_up(cn)); nl = int'(n_lo(cn));
        mu = int'(m_up(cm)); ml = int'(m_lo(cm)); cu = int'(cfg_bits(nu, mu));
        us = pool.size();
        for (int i = 0; i < nx; i++) pool.push_back(cfg[cc+i] ? pool[cs+2*i+1] : pool[cs+2*i]);
        if (has_dir_up(cn, cm)) pool.push_back(pool[cs+2*nx]);
        ls = pool.size();
        for (int i = 0; i < nx; i++) pool.push_back(cfg[cc+i] ? pool[cs+2*i] : pool[cs+2*i+1]);
        if (has_dir_lo(cn, cm)) pool.push_back(pool[cs+2*nx+1]);
        qn.push_back(nu); qm.push_back(mu); qc.push_back(cc+nx);    qo.push_back(co);    qs.push_back(us);
        qn.push_back(nl); qm.push_back(ml); qc.push_back(cc+nx+cu); qo.push_back(co+mu); qs.push_back(ls);
      end
    end
  endfunction

endpackage
