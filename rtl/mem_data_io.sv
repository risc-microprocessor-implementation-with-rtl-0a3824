// mem_data_io: byte lane steering between the datapath and the data pads.
//
// Memory is byte addressed and big endian: the byte at word offset 0 is bits
// 31:24 of the word. For a store, the value of the output memory data
// register is copied into the lanes the access covers and the matching byte
// enables are raised (be[3] is offset 0). For a load, the addressed byte or
// halfword is picked out of the word on the pads and sign or zero extended
// before it goes to the input memory data register. Accesses are taken to
// be naturally aligned: the low address bits below the access size are
// ignored (own choice). Purely combinational.
module mem_data_io
  import dlx_pkg::*;
(
  input  mem_size_e   size,
  input  logic [1:0]  addr_lo,
  input  logic        load_unsigned,
  input  logic [31:0] store_data,
  output logic [31:0] pad_wdata,
  output logic [3:0]  pad_be,
  input  logic [31:0] pad_rdata,
  output logic [31:0] load_data
);

  always_comb begin
    unique case (size)
      MEM_BYTE: begin
        pad_wdata = {4{store_data[7:0]}};
        pad_be    = 4'b1000 >> addr_lo;
      end
      MEM_HALF: begin
        pad_wdata = {2{store_data[15:0]}};
        pad_be    = addr_lo[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        pad_wdata = store_data;
        pad_be    = 4'b1111;
      end
    endcase
  end

  logic [7:0]  byte_v;
  logic [15:0] half_v;
  always_comb begin
    unique case (addr_lo)
      2'd0:    byte_v = pad_rdata[31:24];
      2'd1:    byte_v = pad_rdata[23:16];
      2'd2:    byte_v = pad_rdata[15:8];
      default: byte_v = pad_rdata[7:0];
    endcase
    half_v = addr_lo[1] ? pad_rdata[15:0] : pad_rdata[31:16];
    unique case (size)
      MEM_BYTE: load_data = {{24{byte_v[7]  & ~load_unsigned}}, byte_v};
      MEM_HALF: load_data = {{16{half_v[15] & ~load_unsigned}}, half_v};
      default:  load_data = pad_rdata;
    endcase
  end

endmodule
