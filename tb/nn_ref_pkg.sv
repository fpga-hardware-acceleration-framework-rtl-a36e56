// nn_ref_pkg: integer reference model of the 5-40-16 classifier, used by the
// testbenches. It computes the class of one record the straightforward way:
// every hidden neuron as a full dot product plus bias*2^X_FRAC, shifted right
// by HID_SHIFT and clamped to [0, 2^H_W-1]; every output score as a dot
// product over the hidden activations plus bias*2^H_FRAC; the class as the
// first index of the largest score. It also counts how many hidden neurons
// the ReLU set to zero or clamped at the top, so that tests can show these
// cases occurred.
package nn_ref_pkg;
  import ids_pkg::*;

  typedef longint hid_params_t [N_HID][N_IN+1];
  typedef longint out_params_t [N_OUT][N_HID+1];
  typedef longint features_t   [N_IN];

  function automatic longint sext(input longint v, input int bits);
    return (v << (64 - bits)) >>> (64 - bits);
  endfunction

  function automatic int classify(input hid_params_t wh, input out_params_t wo,
                                  input features_t x, inout int relu_zero, inout int relu_sat);
    longint h [N_HID];
    longint best;
    int     cls;
    for (int j = 0; j < N_HID; j++) begin
      longint s;
      s = wh[j][N_IN] * (longint'(1) << X_FRAC);
      for (int i = 0; i < N_IN; i++) s += x[i] * wh[j][i];
      s = s >>> HID_SHIFT;
      if (s < 0) begin s = 0; relu_zero++; end
      else if (s >= (longint'(1) << H_W)) begin s = (longint'(1) << H_W) - 1; relu_sat++; end
      h[j] = s;
    end
    cls = 0;
    for (int c = 0; c < N_OUT; c++) begin
      longint s;
      s = wo[c][N_HID] * (longint'(1) << H_FRAC);
      for (int j = 0; j < N_HID; j++) s += h[j] * wo[c][j];
      if (c == 0 || s > best) begin best = s; cls = c; end
    end
    return cls;
  endfunction

  // A random model: weights and biases drawn uniformly over the W_W-bit range.
  function automatic void random_model(output hid_params_t wh, output out_params_t wo);
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i <= N_IN; i++) wh[j][i] = sext(longint'($urandom()), W_W);
    for (int c = 0; c < N_OUT; c++)
      for (int j = 0; j <= N_HID; j++) wo[c][j] = sext(longint'($urandom()), W_W);
  endfunction
endpackage
