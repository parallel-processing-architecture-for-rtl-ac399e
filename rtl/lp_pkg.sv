// lp_pkg: constants and helper functions shared by the revised-simplex engine.
//
// All three systolic arrays of the engine are linear arrays fed by a band
// matrix M(i,j) (rows 0..R-1, columns 0..C-1). Element (i,j) lives in cell
// c = i - j + C - 1, so the array has R + C - 1 cells, and it is presented on
// the cell's top input in cycle i + j + C - 1 of the array's operation. This is
// the space-time map [t x y] = [k+i+j, i-j, k] chosen for the pivot array and
// reused for the other arrays. band_ij() inverts that map: given a cell and a
// cycle it tells whether a matrix element is due and which one.
//
// The multi-chip version splits each array over several chips of r cells:
// the diagonal i - j goes to chip floor((i - j + floor(r/2)) / r), cell
// (i - j + floor(r/2)) mod r, so chip 0 holds the main diagonal in its middle
// cell (fdiv, fmod, chip_of and cell_of below).
//
// The number format is a W-bit two's complement fixed-point value with FRAC
// fraction bits. FRAC = 0 gives the plain 8-bit integers the cells were
// specified with; products keep the low W bits after the binary point shift.
//
// The space-time map and the chip placement formulas follow the design;
// the helper functions themselves are this implementation's.
package lp_pkg;

  // Inverse of the band space-time map. Returns 1 and the 0-based (i,j) when
  // cell `cell` must receive element (i,j) of an R x C matrix in cycle `t`.
  function automatic bit band_ij(input int t, input int pos, input int R,
                                 input int C, output int i, output int j);
    int s;
    int dd;
    s  = t - (C - 1);   // i + j
    dd = pos - (C - 1); // i - j
    i  = 0;
    j  = 0;
    if (s < 0) return 1'b0;
    if (((s + dd) & 1) != 0) return 1'b0;
    if ((s + dd) < 0 || (s - dd) < 0) return 1'b0;
    i = (s + dd) / 2;
    j = (s - dd) / 2;
    return (i < R) && (j < C);
  endfunction

  // Floor division and the matching non-negative remainder, for the chip
  // numbering of the multi-chip arrays (chip numbers may be negative).
  function automatic int fdiv(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int fmod(input int a, input int b);
    return a - b * fdiv(a, b);
  endfunction

  // Chip number and cell number of the diagonal i - j = dd when every chip
  // holds r cells: x = floor((dd + floor(r/2)) / r), c = (dd + floor(r/2)) mod r.
  function automatic int chip_of(input int dd, input int r);
    return fdiv(dd + r / 2, r);
  endfunction

  function automatic int cell_of(input int dd, input int r);
    return fmod(dd + r / 2, r);
  endfunction

endpackage
