// ftf_pkg: the arithmetic error-correcting code shared by every block of the
// fault tolerant parallel filter bank.
//
// K data filters are protected by R check filters. Each data filter j owns a
// syndrome pattern (a "column" of the code's check matrix): an R-bit value
// whose most significant bit stands for check 1, the next for check 2, and so
// on. A filter whose output is wrong makes exactly the checks of its column
// fail, so its column is also the syndrome that locates it.
//
// The columns are the values from 2^R-1 downwards that have at least two bits
// set. For R = 3 this gives 111, 110, 101, 011 for filters 1..4, which is the
// Hamming(7,4) code the design is built around (check 1 = filters 1,2,3,
// check 2 = filters 1,2,4, check 3 = filters 1,3,4). Single-bit syndromes
// (100, 010, 001) then point at a check filter, whose error needs no repair.
// The same rule extends the code to other sizes: R = 4 protects up to 11
// data filters. Everything here is evaluated at elaboration time.
package ftf_pkg;

  // Largest number of data filters R check filters can protect.
  function automatic int unsigned max_data(input int unsigned r);
    return (1 << r) - 1 - r;
  endfunction

  // Syndrome pattern of data filter j (0-based), check 1 in the MSB.
  function automatic int unsigned code_column(input int unsigned r, input int unsigned j);
    int unsigned cnt;
    cnt = 0;
    for (int v = (1 << r) - 1; v > 0; v--) begin
      if ($countones(v) >= 2) begin
        if (cnt == j) return v;
        cnt++;
      end
    end
    return 0;
  endfunction

  // True when check i (0-based, i = 0 is check 1) includes data filter j.
  function automatic bit check_has(input int unsigned r, input int unsigned i,
                                   input int unsigned j);
    return ((code_column(r, j) >> (r - 1 - i)) & 1) != 0;
  endfunction

  // First check that includes data filter j; it is the one used to rebuild
  // the output of filter j.
  function automatic int unsigned first_check(input int unsigned r, input int unsigned j);
    for (int unsigned i = 0; i < r; i++)
      if (check_has(r, i, j)) return i;
    return 0;
  endfunction

endpackage
