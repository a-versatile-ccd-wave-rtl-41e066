// addr_decoder: host bus address decoder.
//
// The host downloads everything the controller runs from: sequence fragments and
// their hold times, the fragment table, the superpixel list, the geometric factors
// and the configuration registers.  This decoder turns a bus write {addr, we} into
// one write enable per region and the word offset inside it.  The map (see
// wfs_pkg::region_e) is this design's own; writes outside it are ignored and raise
// the one-cycle bad_addr flag.  Purely combinational.
module addr_decoder
  import wfs_pkg::*;
(
  input  logic [15:0] addr,
  input  logic        we,
  output region_e     region,
  output logic [8:0]  offset,
  output logic        frag_we,
  output logic        loc_we,
  output logic        list_we,
  output logic        gain_we,
  output logic        cfg_we,
  output logic        bad_addr
);
  always_comb begin
    unique case (addr[15:8])
      8'h00:        region = R_FRAG;
      8'h01:        region = R_LOC;
      8'h02, 8'h03: region = R_LIST;
      8'h04:        region = R_GAIN;
      8'h05:        region = R_CFG;
      default:      region = R_NONE;
    endcase
    offset   = (region == R_LIST) ? {addr[8], addr[7:0]} : {1'b0, addr[7:0]};
    frag_we  = we && region == R_FRAG;
    loc_we   = we && region == R_LOC;
    list_we  = we && region == R_LIST;
    gain_we  = we && region == R_GAIN;
    cfg_we   = we && region == R_CFG;
    bad_addr = we && region == R_NONE;
  end

  a_one_select: assert final ($onehot0({frag_we, loc_we, list_we, gain_we, cfg_we, bad_addr}));
endmodule
