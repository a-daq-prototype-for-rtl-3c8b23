// tb_util.svh: helpers shared by the DAQ testbenches, included inside a
// testbench module that imports daq_pkg. Builds host frames and the
// expected bytes of a data packet, written from the packet format
// independently of the RTL that produces it.
  typedef logic [7:0] bytes_t[$];

  typedef struct {
    vmm_hit_t    hit;
    logic        vmm;
    logic [23:0] id;
  } exp_hit_t;

  // destination MAC, source MAC, token, payload (padded to 46 bytes)
  function automatic bytes_t make_frame(logic [47:0] dst, logic [47:0] src,
                                        logic [15:0] token, bytes_t payload);
    bytes_t f;
    for (int i = 5; i >= 0; i--) f.push_back(dst[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(src[8*i +: 8]);
    f.push_back(token[15:8]);
    f.push_back(token[7:0]);
    foreach (payload[i]) f.push_back(payload[i]);
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

  function automatic bytes_t exp_packet(logic [47:0] host, logic [47:0] board,
                                        bit ext, exp_hit_t h[$]);
    bytes_t f;
    int len = ext ? 15 * 8 : 15 * 5;
    for (int i = 5; i >= 0; i--) f.push_back(host[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(board[8*i +: 8]);
    f.push_back(8'(len >> 8));
    f.push_back(8'(len));
    foreach (h[k]) begin
      logic [39:0] w = {3'b000, h[k].vmm, h[k].hit};
      for (int i = 4; i >= 0; i--) f.push_back(w[8*i +: 8]);
      if (ext) for (int i = 2; i >= 0; i--) f.push_back(h[k].id[8*i +: 8]);
    end
    return f;
  endfunction

  function automatic vmm_hit_t rand_hit();
    logic [63:0] r = {$urandom(), $urandom()};
    return vmm_hit_t'(r[EVT_BITS-1:0]);
  endfunction
