// tb_tea_ref_pkg: reference model of TEA for the testbenches, written
// directly from the cipher's round equations and independent of the RTL's
// schedule. Encryption: sum += delta; y += ((z<<4)+k0) ^ (z+sum) ^ ((z>>5)+k1);
// z += ((y<<4)+k2) ^ (y+sum) ^ ((y>>5)+k3). Decryption runs the inverse from
// sum = delta*rounds.
package tb_tea_ref_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef logic [31:0] u32;

  function automatic u32 f(u32 x, u32 s, u32 ka, u32 kb);
    return ((x << 4) + ka) ^ (x + s) ^ ((x >> 5) + kb);
  endfunction

  // Y/Z after 'rounds' rounds of encryption.
  function automatic void encrypt(input u32 v0, input u32 v1, input u32 k[4], input u32 delta,
                                  input int rounds, output u32 y, output u32 z);
    u32 s;
    y = v0; z = v1; s = 0;
    for (int i = 0; i < rounds; i++) begin
      s = s + delta;
      y = y + f(z, s, k[0], k[1]);
      z = z + f(y, s, k[2], k[3]);
    end
  endfunction

  // Y/Z after 'done_rounds' of 'rounds' rounds of decryption.
  function automatic void decrypt(input u32 v0, input u32 v1, input u32 k[4], input u32 delta,
                                  input int rounds, input int done_rounds, output u32 y, output u32 z);
    u32 s;
    y = v0; z = v1; s = delta * u32'(rounds);
    for (int i = 0; i < done_rounds; i++) begin
      z = z - f(y, s, k[2], k[3]);
      y = y - f(z, s, k[0], k[1]);
      s = s - delta;
    end
  endfunction
endpackage
