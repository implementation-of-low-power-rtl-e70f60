// ilv_ref_pkg: reference model for the interleaver testbenches.
//
// Evaluates the 802.16e two-step permutation directly, with division and
// floor, so the testbenches can check the hardware, which never divides,
// against an independent computation. The mode table (modulation, ID) ->
// block size is kept here separately from the RTL package on purpose.
package ilv_ref_pkg;

  // bits per sub-carrier / 2, at least 1
  function automatic int ref_s(int mod_type);
    case (mod_type)
      0, 1:    return 1;
      2:       return 2;
      default: return 3;
    endcase
  endfunction

  // block size Ncbps for a modulation and a depth ID
  function automatic int ref_ncbps(int mod_type, int id);
    int qpsk [8]  = '{96, 144, 192, 288, 384, 432, 480, 576};
    int qam16 [4] = '{192, 288, 384, 576};
    int qam64 [4] = '{288, 384, 432, 576};
    case (mod_type)
      0:       return 48;
      1:       return qpsk[id % 8];
      2:       return qam16[id % 4];
      default: return qam64[id % 4];
    endcase
  endfunction

  // write address of input k
  function automatic int ref_jk(int ncbps, int s, int k);
    int mk;
    mk = (ncbps / 16) * (k % 16) + (k / 16);
    return s * (mk / s) + ((mk + ncbps - (16 * mk) / ncbps) % s);
  endfunction

endpackage
