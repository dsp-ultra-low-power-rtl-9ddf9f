// lsu: load/store unit of FU0 and FU1. Forms the byte address a + k (base
// register plus constant, the constant possibly built from the IRF), turns it
// into a word-addressed request with byte enables for one port of the data
// memory, replicates store data into the addressed byte lanes, and describes a
// load (destination, size, sign extension, byte offset) for the memory stage,
// which formats the returned word one cycle later.
//
// The document places an LSU in FU0 and FU1 and says loads are the only
// instructions taking more than one cycle. Access sizes, little-endian byte
// order and the one-cycle memory latency are this design's choices. Accesses
// must be naturally aligned; the low address bits a misaligned access would
// need are ignored. Combinational.
module lsu
  import slimsrp_pkg::*;
(
  input  logic       en,     // a valid LSU operation in this slot
  input  opcode_e    op,
  input  logic [4:0] rd,
  input  word_t      a,      // base address register
  input  word_t      k,      // constant offset
  input  word_t      sd,     // store data register
  output mem_req_t   req,
  output ld_info_t   ld
);
  always_comb begin
    word_t     addr;
    logic      is_ld;
    logic [1:0] size;
    addr  = a + k;
    is_ld = op inside {OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU};
    unique case (op)
      OP_LB, OP_LBU, OP_SB: size = 2'd0;
      OP_LH, OP_LHU, OP_SH: size = 2'd1;
      default:              size = 2'd2;
    endcase
    req       = '0;
    req.en    = en;
    req.we    = en && !is_ld;
    req.addr  = addr[31:2];
    unique case (size)
      2'd0: begin
        req.be    = 4'b0001 << addr[1:0];
        req.wdata = {4{sd[7:0]}};
      end
      2'd1: begin
        req.be    = addr[1] ? 4'b1100 : 4'b0011;
        req.wdata = {2{sd[15:0]}};
      end
      default: begin
        req.be    = 4'b1111;
        req.wdata = sd;
      end
    endcase
    ld.valid = en && is_ld;
    ld.rd    = rd;
    ld.size  = size;
    ld.sext  = op inside {OP_LB, OP_LH};
    ld.boff  = (size == 2'd1) ? {addr[1], 1'b0} : (size == 2'd0) ? addr[1:0] : 2'd0;
  end
endmodule
