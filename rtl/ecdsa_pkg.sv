// ecdsa_pkg: constants and types shared by the ECDSA datapath.
// The field is GF(2^409) in polynomial basis with the NIST pentanomial-free
// trinomial f(x) = x^409 + x^87 + 1; the curve is NIST B-409
// (y^2 + xy = x^3 + a x^2 + b, a = 1) with base point G of prime order n.
// The field size follows the paper; the curve constants are the published
// NIST B-409 domain parameters, which the paper names but does not print.
package ecdsa_pkg;
  localparam int unsigned M = 409;       // field degree and width of every datapath word
  localparam int unsigned K = 87;        // middle term of f(x)
  typedef logic [M-1:0] elem_t;

  localparam elem_t CURVE_B = 409'h021A5C2C8EE9FEB5C4B9A753B7B476B7FD6422EF1F3DD674761FA99D6AC27C8A9A197B272822F6CD57A55AA4F50AE317B13545F;
  localparam elem_t GX      = 409'h15D4860D088DDB3496B0C6064756260441CDE4AF1771D4DB01FFE5B34E59703DC255A868A1180515603AEAB60794E54BB7996A7;
  localparam elem_t GY      = 409'h061B1CFAB6BE5F32BBFA78324ED106A7636B9C5A7BD198D0158AA4F5488D08F38514F1FDF4B4F40D2181B3681C364BA0273C706;
  localparam elem_t N_ORDER = 409'h10000000000000000000000000000000000000000000000000001E2AAD6A612F33307BE5FA47C3C9E052F838164CD37D9A21173;

  // ECC processor operations
  typedef enum logic {ECC_SMUL = 1'b0, ECC_PADD = 1'b1} ecc_op_e;
  // ECC processor input registers
  typedef enum logic [2:0] {LD_KEY = 3'd0, LD_PX = 3'd1, LD_PY = 3'd2, LD_QX = 3'd3, LD_QY = 3'd4} ecc_ld_e;
  // modular arithmetic processor operations (mod n)
  typedef enum logic [1:0] {MOD_RED = 2'd0, MOD_ADD = 2'd1, MOD_MUL = 2'd2, MOD_INV = 2'd3} mod_op_e;
  // top-level commands
  typedef enum logic [1:0] {CMD_KEYGEN = 2'd0, CMD_SIGN = 2'd1, CMD_VERIFY = 2'd2} ecdsa_cmd_e;
  // error codes reported by the control unit
  typedef enum logic [3:0] {
    ERR_NONE      = 4'd0,
    ERR_R_ZERO    = 4'd1,   // signing produced r = 0
    ERR_S_ZERO    = 4'd2,   // signing produced s = 0
    ERR_RANGE     = 4'd3,   // an input (k, r' or s') is outside [1, n-1]
    ERR_INFINITY  = 4'd4,   // a point multiplication/addition gave the point at infinity
    ERR_INVALID   = 4'd5,   // verification: r' != v
    ERR_BAD_CMD   = 4'd6
  } ecdsa_err_e;
endpackage
