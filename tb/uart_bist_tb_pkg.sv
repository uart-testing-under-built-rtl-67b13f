// uart_bist_tb_pkg: reference models used by the testbenches.
//
// Written independently of the RTL, from the polynomial x^8+x^6+x^5+x^4+1:
//  * lfsr_next: external-XOR step, new top bit = x0 ^ x4 ^ x5 ^ x6, shift toward x0.
//  * misr_next: right-shifting internal-XOR division step with toggle mask 0xB8
//    (x^8, x^6, x^5, x^4 map to bits 7, 5, 4, 3), then the response byte XORed in.
//  * golden_signature: the signature both MISRs reach after n patterns taken from
//    the LFSR seeded with 8'h01 and stepped once before each pattern.
package uart_bist_tb_pkg;

  function automatic logic [7:0] lfsr_next(input logic [7:0] s);
    logic fb;
    fb = s[0] ^ s[4] ^ s[5] ^ s[6];
    return {fb, s[7:1]};
  endfunction

  function automatic logic [7:0] misr_next(input logic [7:0] s, input logic [7:0] d);
    logic [7:0] t;
    t = s >> 1;
    if (s[0]) t = t ^ 8'hB8;
    return t ^ d;
  endfunction

  function automatic logic [7:0] golden_signature(input int n);
    logic [7:0] p, sig;
    p   = 8'h01;
    sig = 8'h00;
    for (int k = 0; k < n; k++) begin
      p   = lfsr_next(p);
      sig = misr_next(sig, p);
    end
    return sig;
  endfunction

endpackage
