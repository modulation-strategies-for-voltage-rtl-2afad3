// mc_pattern_pkg: switching pattern lookup table of the matrix
// converter's indirect space vector modulation, as reference data for the
// testbenches. One row per (rectifier sector, inverter sector), row index
// 6*(r-1) + (k-1). Columns: ir1 vi1, ir1 vi2, ir2 vi1, ir2 vi2, ir1 v0,
// ir2 v0 (normal pattern), ir1 v0, ir2 v0 (optimized pattern). "AB_110":
// input A on the positive rail, input B on the negative rail; outputs U and
// V joined to the positive rail, W to the negative one.
package mc_pattern_pkg;

  string table_rows [36] = '{
      "AB_100 AB_110 AC_100 AC_110 AB_111 AC_111 AB_111 AC_111",
      "AB_110 AB_010 AC_110 AC_010 AB_000 AC_000 AB_111 AC_111",
      "AB_010 AB_011 AC_010 AC_011 AB_111 AC_111 AB_111 AC_111",
      "AB_011 AB_001 AC_011 AC_001 AB_000 AC_000 AB_111 AC_111",
      "AB_001 AB_101 AC_001 AC_101 AB_111 AC_111 AB_111 AC_111",
      "AB_101 AB_100 AC_101 AC_100 AB_000 AC_000 AB_111 AC_111",
      "AC_100 AC_110 BC_100 BC_110 AC_111 BC_111 AC_000 BC_000",
      "AC_110 AC_010 BC_110 BC_010 AC_000 BC_000 AC_000 BC_000",
      "AC_010 AC_011 BC_010 BC_011 AC_111 BC_111 AC_000 BC_000",
      "AC_011 AC_001 BC_011 BC_001 AC_000 BC_000 AC_000 BC_000",
      "AC_001 AC_101 BC_001 BC_101 AC_111 BC_111 AC_000 BC_000",
      "AC_101 AC_100 BC_101 BC_100 AC_000 BC_000 AC_000 BC_000",
      "BC_100 BC_110 BA_100 BA_110 BC_111 BA_111 BC_111 BA_111",
      "BC_110 BC_010 BA_110 BA_010 BC_000 BA_000 BC_111 BA_111",
      "BC_010 BC_011 BA_010 BA_011 BC_111 BA_111 BC_111 BA_111",
      "BC_011 BC_001 BA_011 BA_001 BC_000 BA_000 BC_111 BA_111",
      "BC_001 BC_101 BA_001 BA_101 BC_111 BA_111 BC_111 BA_111",
      "BC_101 BC_100 BA_101 BA_100 BC_000 BA_000 BC_111 BA_111",
      "BA_100 BA_110 CA_100 CA_110 BA_111 CA_111 BA_000 CA_000",
      "BA_110 BA_010 CA_110 CA_010 BA_000 CA_000 BA_000 CA_000",
      "BA_010 BA_011 CA_010 CA_011 BA_111 CA_111 BA_000 CA_000",
      "BA_011 BA_001 CA_011 CA_001 BA_000 CA_000 BA_000 CA_000",
      "BA_001 BA_101 CA_001 CA_101 BA_111 CA_111 BA_000 CA_000",
      "BA_101 BA_100 CA_101 CA_100 BA_000 CA_000 BA_000 CA_000",
      "CA_100 CA_110 CB_100 CB_110 CA_111 CB_111 CA_111 CB_111",
      "CA_110 CA_010 CB_110 CB_010 CA_000 CB_000 CA_111 CB_111",
      "CA_010 CA_011 CB_010 CB_011 CA_111 CB_111 CA_111 CB_111",
      "CA_011 CA_001 CB_011 CB_001 CA_000 CB_000 CA_111 CB_111",
      "CA_001 CA_101 CB_001 CB_101 CA_111 CB_111 CA_111 CB_111",
      "CA_101 CA_100 CB_101 CB_100 CA_000 CB_000 CA_111 CB_111",
      "CB_100 CB_110 AB_100 AB_110 CB_111 AB_111 CB_000 AB_000",
      "CB_110 CB_010 AB_110 AB_010 CB_000 AB_000 CB_000 AB_000",
      "CB_010 CB_011 AB_010 AB_011 CB_111 AB_111 CB_000 AB_000",
      "CB_011 CB_001 AB_011 AB_001 CB_000 AB_000 CB_000 AB_000",
      "CB_001 CB_101 AB_001 AB_101 CB_111 AB_111 CB_000 AB_000",
      "CB_101 CB_100 AB_101 AB_100 CB_000 AB_000 CB_000 AB_000"
  };

  // column of the table used in pattern part 0..5 (saw below c1 .. above c5)
  function automatic int pattern_column(input bit opt, input int r, input int k, input int part);
    bit swap;
    int cols [6];
    swap = opt && ((r + k) % 2 == 1);
    cols = '{swap ? 1 : 0, swap ? 0 : 1, opt ? 6 : 4, opt ? 7 : 5, swap ? 2 : 3, swap ? 3 : 2};
    return cols[part];
  endfunction

  // input phase (0 = A/U, 1 = B/V, 2 = C/W) joined to output y by a table entry
  function automatic int entry_input(input int r, input int k, input int col, input int y);
    string e;
    e = table_rows[(r - 1) * 6 + (k - 1)].substr(col * 7, col * 7 + 5);
    return (e[3 + y] == "1") ? int'(e[0]) - int'("A") : int'(e[1]) - int'("A");
  endfunction

endpackage
