// nn_tables_pkg: contents of the network's constant memories, computed at
// elaboration time.
//
//  - ROM3, the activation table, is defined by a formula:
//      ROM3[i] = round(127 * tanh((i - 128) / 32)),  i = 0..255
//  - ROM1, ROM2 and the two bias tables hold trained parameters. The trained
//    values of the published network are not available, so these functions
//    fill them with reproducible pseudo-random values from the 31-bit linear
//    congruential sequence
//      s(n+1) = (1103515245 * s(n) + 12345) mod 2^31,  r(n) = s(n) >> 8
//    (seed s(0) = 1 for ROM1, 2 for ROM2, 3 for the hidden biases and 4 for
//    the output biases), each value being r mod 2^B - 2^(B-1):
//      ROM1  B = 11 (-1024..1023)     hidden bias B = 16 (-32768..32767)
//      ROM2  B = 8  (-128..127)       output bias B = 13 (-4096..4095)
//    To use trained weights, replace the bodies of rom1_init, rom2_init,
//    bias1_init and bias2_init (for example with constant array literals);
//    nothing else changes.
// Addressing: ROM1 word i*32+j is the weight from input i to hidden neuron
// j; ROM2 word j*4+k is the weight from hidden neuron j to output neuron k.
package nn_tables_pkg;
  import nn_pkg::*;

  typedef logic signed [W1_W-1:0]   rom1_t  [N_IN * N_HID];
  typedef logic signed [W2_W-1:0]   rom2_t  [N_HID * N_OUT];
  typedef logic signed [ACT_W-1:0]  rom3_t  [2**ACT_AW];
  typedef logic signed [ACC1_W-1:0] bias1_t [N_HID];
  typedef logic signed [ACC2_W-1:0] bias2_t [N_OUT];

  function automatic int unsigned lcg_next(int unsigned s);
    return (32'd1103515245 * s + 32'd12345) & 32'h7FFF_FFFF;
  endfunction

  // next pseudo-random value in -2^(b-1) .. 2^(b-1)-1
  function automatic int lcg_value(int unsigned s, int b);
    return int'((s >> 8) % (32'd1 << b)) - (1 << (b - 1));
  endfunction

  function automatic rom1_t rom1_init();
    rom1_t r;
    int unsigned s = 1;
    for (int i = 0; i < N_IN * N_HID; i++) begin
      s = lcg_next(s);
      r[i] = W1_W'(lcg_value(s, 11));
    end
    return r;
  endfunction

  function automatic rom2_t rom2_init();
    rom2_t r;
    int unsigned s = 2;
    for (int i = 0; i < N_HID * N_OUT; i++) begin
      s = lcg_next(s);
      r[i] = W2_W'(lcg_value(s, 8));
    end
    return r;
  endfunction

  function automatic bias1_t bias1_init();
    bias1_t r;
    int unsigned s = 3;
    for (int i = 0; i < N_HID; i++) begin
      s = lcg_next(s);
      r[i] = ACC1_W'(lcg_value(s, 16));
    end
    return r;
  endfunction

  function automatic bias2_t bias2_init();
    bias2_t r;
    int unsigned s = 4;
    for (int i = 0; i < N_OUT; i++) begin
      s = lcg_next(s);
      r[i] = ACC2_W'(lcg_value(s, 13));
    end
    return r;
  endfunction

  function automatic rom3_t rom3_init();
    rom3_t r;
    for (int i = 0; i < 2**ACT_AW; i++)
      r[i] = ACT_W'($rtoi($floor(127.0 * $tanh(real'(i - 128) / 32.0) + 0.5)));
    return r;
  endfunction

endpackage
