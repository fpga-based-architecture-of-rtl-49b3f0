// shared_mult: the one multiplier that the requantizer, antialias and IMDCT
// subcores share.  The controller runs these subcores one at a time, so the
// stage code it drives selects whose operands reach the multiplier; the other
// subcores see the same product but ignore it.  The product is combinational
// (a*b, 32x20 -> 52 bits, signed).  Sharing one multiplier follows the
// document; the operand widths are this design's choice.
module shared_mult
  import mp3_pkg::*;
(
  input  stage_e    stage,
  input  mul_req_t  req_req,    // requantizer
  input  mul_req_t  alias_req,  // antialias
  input  mul_req_t  imdct_req,  // IMDCT
  output mul_prod_t prod
);
  mul_req_t sel;

  always_comb begin
    unique case (stage)
      ST_REQ:   sel = req_req;
      ST_ALIAS: sel = alias_req;
      ST_IMDCT: sel = imdct_req;
      default:  sel = '0;
    endcase
    prod = mul_prod_t'(sel.a) * mul_prod_t'(sel.b);
  end
endmodule
