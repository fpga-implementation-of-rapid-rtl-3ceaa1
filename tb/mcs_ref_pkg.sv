// mcs_ref_pkg: behavioural reference models of the key generator and the
// scramble-data generator, for the testbenches. They restate the rules the
// RTL documents (LFSR taps 127/125/100/98 shifting left; three xorshift
// rounds over the seed {PIN, serial, ~PIN, address}) in plain procedural
// code, bit by bit for the LFSR.
package mcs_ref_pkg;

  function automatic logic [127:0] lfsr_next(logic [127:0] s);
    logic fb;
    fb = s[127] ^ s[125] ^ s[100] ^ s[98];
    for (int i = 127; i > 0; i--) s[i] = s[i-1];
    s[0] = fb;
    return s;
  endfunction

  function automatic logic [127:0] scramble_ref(logic [31:0] pin, logic [31:0] serial,
                                                int unsigned addr);
    logic [127:0] x;
    x[127:96] = pin;
    x[95:64]  = serial;
    x[63:32]  = ~pin;
    x[31:0]   = addr;
    repeat (3) begin
      x ^= x << 29;
      x ^= x >> 41;
      x ^= x << 7;
    end
    return x;
  endfunction

endpackage
