// tb_ref_pkg: reference models shared by the testbenches.
//
// The C/A code is produced here by the G2-delay formulation (the G2 sequence
// read with a per-PRN delay in chips), independently of the tap-selection form
// used in the RTL. The delays are those of the GPS interface specification.
package tb_ref_pkg;

  // G2 delay in chips for PRN 1..32.
  function automatic int g2_delay(int prn);
    int d [32] = '{5,6,7,8,17,18,139,140,141,251,252,254,255,256,257,258,
                   469,470,471,472,473,474,509,512,513,514,515,516,859,860,861,862};
    return d[prn-1];
  endfunction

  // Chip k (0..1022) of the C/A code of a PRN, as 0/1.
  function automatic bit ca_chip(int prn, int k);
    bit g1 [1023];
    bit g2 [1023];
    bit [9:0] r1, r2;   // r[0] is stage 1
    r1 = '1; r2 = '1;
    for (int n = 0; n < 1023; n++) begin
      g1[n] = r1[9];
      g2[n] = r2[9];
      r1 = {r1[8:0], r1[2] ^ r1[9]};
      r2 = {r2[8:0], r2[1] ^ r2[2] ^ r2[5] ^ r2[7] ^ r2[8] ^ r2[9]};
    end
    return g1[k] ^ g2[(k - g2_delay(prn) + 1023) % 1023];
  endfunction

  // Chip of LUT entry n when 1023 chips are spread over len samples.
  function automatic int lut_chip(int n, int len);
    return int'((longint'(n) * 1023) / len);
  endfunction

  // +1 for chip 0, -1 for chip 1.
  function automatic int chip_sign(bit c);
    return c ? -1 : 1;
  endfunction

  // Level of a 3-bit sample word.
  function automatic int level(bit [2:0] c);
    return 2 * int'($signed(c)) + 1;
  endfunction

endpackage
