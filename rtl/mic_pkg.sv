// mic_pkg: constants and helper functions shared by the multi-input counter
// modules. cpc_width(n) is the number of bits needed to hold a count of 0..n,
// which is also the number of levels of the divide-and-conquer counter tree
// that counts n single-bit inputs (the tree is padded to 2^w - 1 inputs).
package mic_pkg;

  // Smallest w with 2^w - 1 >= n (w >= 1).
  function automatic int unsigned cpc_width(int unsigned n);
    int unsigned w;
    w = 1;
    while (((1 << w) - 1) < n) w++;
    return w;
  endfunction

endpackage
