// outmem_addr: output memory addressing and output probability adder.
//
// The output memory holds, per state class, the cost of each quantised speech
// feature value. It is four banks of 2M x 8. The output lookup memory maps the
// state address to a class index (`lookup`), which is combined here with 8-bit
// speech feature values into bank addresses:
//  * mode 0 (one feature): address = {lookup[14:0], feature[0]} (23 bits); its
//    top two bits pick the bank and the low 21 bits address it. `outprob` is
//    the byte read from that bank.
//  * mode 1 (four features): bank k is addressed by {lookup[12:0],
//    feature[k]} (21 bits), and `outprob` is the sum of the four bytes read,
//    saturated to 8 bits.
// Which lookup bits are used and the saturation are this design's choices.
// Combinational: addresses follow the inputs, `outprob` follows the bank data.
module outmem_addr (
  input  logic        mode,
  input  logic [15:0] lookup,
  input  logic [7:0]  feature   [4],
  output logic [20:0] bank_addr [4],
  input  logic [7:0]  bank_data [4],
  output logic [7:0]  outprob
);

  logic [22:0] addr23;
  logic [9:0]  sum;

  always_comb begin
    addr23 = {lookup[14:0], feature[0]};
    sum    = 10'(bank_data[0]) + 10'(bank_data[1]) + 10'(bank_data[2]) + 10'(bank_data[3]);
    for (int k = 0; k < 4; k++) begin
      bank_addr[k] = mode ? {lookup[12:0], feature[k]} : addr23[20:0];
    end
    if (mode) outprob = (sum > 10'd255) ? 8'hFF : sum[7:0];
    else      outprob = bank_data[addr23[22:21]];
  end

endmodule
