// giq_pkg: constants and helpers shared by the generalized-insertion-queue
// (GIQ) interconnect.
//
// The defaults describe the proof-of-concept array: 32 identical processing
// elements (PEs), each attached to the bundle through six ports, on a bundle
// of eight data lines. Data paths are one bit wide, the width used for every
// cost figure of the design; all modules take the width as a parameter.
//
// Configuration word of one port switch (N+1 bits, N = number of lines):
//   bit N        remove enable: the port takes line 1 out of the bundle
//   bits N-1..0  insert thermometer: bit w-1 is the control bit of line w.
//                INSERT-k sets bits k-1..N-1 and clears the bits below;
//                all zero bypasses the port.
// A legal word never has the remove bit and an insert bit set together.
package giq_pkg;

  localparam int unsigned DEF_NUM_PES   = 32;
  localparam int unsigned DEF_PORTS     = 6;
  localparam int unsigned DEF_LINES     = 8;
  localparam int unsigned DEF_WIDTH     = 1;
  // Number of stored precomputed configurations (a choice of this design).
  localparam int unsigned DEF_NUM_CFG   = 4;

  localparam int unsigned MAX_LINES     = 32;

  // Insert thermometer for INSERT-k on an n-line bundle (k = 0: bypass).
  function automatic logic [MAX_LINES-1:0] insert_code(int unsigned k, int unsigned n);
    logic [MAX_LINES-1:0] code;
    for (int unsigned w = 1; w <= MAX_LINES; w++)
      code[w-1] = (k != 0) && (w >= k) && (w <= n);
    return code;
  endfunction

  // True when the low n bits of code form a legal insert thermometer:
  // once a line's bit is set, every higher line's bit is set too.
  function automatic logic insert_code_ok(logic [MAX_LINES-1:0] code, int unsigned n);
    logic ok;
    ok = 1'b1;
    for (int unsigned w = 1; w < n; w++)
      if (code[w-1] && !code[w]) ok = 1'b0;
    return ok;
  endfunction

endpackage
