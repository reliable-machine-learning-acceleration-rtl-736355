// Reference model of a binary fully connected layer for the testbenches:
// activation j = 1 when 2*p_j - n >= 0, with p_j the number of positions i
// where input bit i equals weight bit (j, i). Bit vectors are held as
// dynamic arrays so that one model serves every layer size.
package tb_bnn_ref_pkg;

  typedef bit bitvec_t [];

  function automatic bitvec_t layer_ref(input bitvec_t x, input bitvec_t w, input int n_in, input int n_out);
    bitvec_t y;
    y = new[n_out];
    for (int j = 0; j < n_out; j++) begin
      int p;
      p = 0;
      for (int i = 0; i < n_in; i++) if (x[i] == w[j * n_in + i]) p++;
      y[j] = (2 * p - n_in) >= 0;
    end
    return y;
  endfunction

  function automatic bitvec_t random_bits(input int n);
    bitvec_t v;
    v = new[n];
    foreach (v[i]) v[i] = bit'($urandom % 2);
    return v;
  endfunction

  // weight word k of neuron j, as stored in the layer's block RAM
  function automatic logic [63:0] weight_word(input bitvec_t w, input int n_in, input int j, input int k, input int wd);
    logic [63:0] r;
    r = '0;
    for (int b = 0; b < wd; b++)
      if (k * wd + b < n_in) r[b] = w[j * n_in + k * wd + b];
    return r;
  endfunction

endpackage
