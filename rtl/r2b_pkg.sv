// r2b_pkg: constants shared by the residue-to-binary converter.
//
// The converter handles the three-modulus residue number system
// {2^K+1, 2^K, 2^K-1}. K_DEFAULT is the residue width used when a module is
// built without overriding K (or W = 2*K). K = 8 is one of the three sizes
// (4, 8, 16) for which the converter's delay and area are tabulated; any
// K >= 2 works.
package r2b_pkg;

  // Default residue width k.
  parameter int unsigned K_DEFAULT = 8;

  // Default width of the modulo 2^(2k)-1 datapath.
  parameter int unsigned W_DEFAULT = 2 * K_DEFAULT;

endpackage
