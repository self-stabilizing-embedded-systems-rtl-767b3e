// segment_unit: segment check and address translation of every data access.
//
// All RAM accesses name a segment and an offset within it. The segment table
// (base and size per segment, see ss_pkg) is a constant, i.e. it sits in ROM
// and a fault cannot change it. An access whose segment number does not
// exist or whose offset is not below the segment size raises violation,
// which resets the machine; the access must then be suppressed by the
// caller. This is how a corrupted ring-buffer index or stack pointer is
// stopped from reaching other segments (part of the concept); the
// base/size form of the table and its contents are this design's choice.
// Combinational.
module segment_unit import ss_pkg::*; (
  input  logic             req,       // an access is made this cycle
  input  logic [SEG_W-1:0] seg,       // segment number
  input  word_t            offset,    // word offset within the segment
  output logic [RAM_AW-1:0] addr,     // RAM word address
  output logic             violation  // access outside its segment
);
  always_comb begin
    addr      = '0;
    violation = req;
    for (int s = 0; s < NSEG; s++) begin
      if (seg == SEG_W'(s) && offset < word_t'(SEG_SIZE[s])) begin
        addr      = RAM_AW'(SEG_BASE[s] + offset);
        violation = 1'b0;
      end
    end
  end
endmodule
